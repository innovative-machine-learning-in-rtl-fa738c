// tb_ga_pop_mem: population memory (32 x 16 bits, 4 asynchronous read ports).
// Random writes and reads against a reference array: a write is visible on
// every read port from the clock after it, and all ports read independently
// (including several ports on one address and a read of the address being
// written, which must still return the old word before the edge).
module tb_ga_pop_mem;
  timeunit 1ns; timeprecision 1ps;
  localparam int D = 32, W = 16, NRD = 4;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr [NRD];
  logic [W-1:0] wdata = 0, rdata [NRD];
  logic [W-1:0] ref_m [D];
  int checks = 0, failures = 0;
  ga_pop_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // fill
    for (int a = 0; a < D; a++) begin
      #1 we = 1; waddr = a; wdata = $urandom; ref_m[a] = wdata; @(posedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      #1;
      we = $urandom % 2; waddr = $urandom; wdata = $urandom;
      for (int p = 0; p < NRD; p++) raddr[p] = ($urandom % 4 == 0) ? waddr : 5'($urandom);
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== ref_m[raddr[p]]) begin failures++; $display("port %0d addr %0d got %h exp %h", p, raddr[p], rdata[p], ref_m[raddr[p]]); end
      end
      @(posedge clk);
      if (we) ref_m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
