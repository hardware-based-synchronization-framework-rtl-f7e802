// tb_drs_cfg_sram: checks the task configuration SRAM against an array model.
// Random writes and reads over the whole depth, including read-during-write
// of the same address (old data expected) and rdata holding while re is low.
module tb_drs_cfg_sram;
  localparam int DEPTH = 64, WIDTH = 128;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [5:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata, model [DEPTH], expect_q;
  bit   exp_valid;
  int checks = 0, failures = 0;

  drs_cfg_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_valid = 0;
    // fill the memory
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL read: got %h expected %h", rdata, expect_q);
        end
      end
      we = ($urandom_range(1) == 0);
      re = ($urandom_range(2) != 0);
      waddr = 6'($urandom_range(DEPTH - 1));
      raddr = ($urandom_range(3) == 0) ? waddr : 6'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (re) begin expect_q = model[raddr]; exp_valid = 1; end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
