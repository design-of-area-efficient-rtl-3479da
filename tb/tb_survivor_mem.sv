// tb_survivor_mem -- self-checking testbench of the survivor memory.
//
// Fills all 64 columns with random decision vectors, then keeps writing random columns
// while both read ports read random (column, state) pairs; every read bit is compared with
// a shadow copy of the memory kept by the testbench, including reads of the column being
// written in the same cycle (which must return the old contents).
module tb_survivor_mem;

  logic clk = 1'b0;
  logic we;
  logic [5:0]  waddr, raddr_tb, raddr_dc, rsel_tb, rsel_dc;
  logic [63:0] wdata;
  logic        rbit_tb, rbit_dc;
  logic [63:0] shadow [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  survivor_mem dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0;
    raddr_tb = '0; raddr_dc = '0; rsel_tb = '0; rsel_dc = '0;
    @(negedge clk);
    for (int c = 0; c < 64; c++) begin
      we = 1'b1;
      waddr = 6'(c);
      wdata = {$urandom, $urandom};
      shadow[c] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom);
      waddr = 6'($urandom);
      wdata = {$urandom, $urandom};
      raddr_tb = (n % 7 == 0) ? waddr : 6'($urandom);
      raddr_dc = 6'($urandom);
      rsel_tb = 6'($urandom);
      rsel_dc = 6'($urandom);
      #1;
      checks += 2;
      if (rbit_tb !== shadow[raddr_tb][rsel_tb]) begin
        failures++;
        $display("port tb: col %0d state %0d", raddr_tb, rsel_tb);
      end
      if (rbit_dc !== shadow[raddr_dc][rsel_dc]) begin
        failures++;
        $display("port dc: col %0d state %0d", raddr_dc, rsel_dc);
      end
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
