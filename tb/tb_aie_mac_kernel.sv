// tb_aie_mac_kernel: random int8 operand vectors, including the extremes
// -128 and 127, against a dot product computed in the testbench; checks the
// one-clock latency, valid propagation and that a low `en` holds the result.
module tb_aie_mac_kernel;
  timeunit 1ns; timeprecision 1ps;
  localparam int LANES = 16;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  l1_pkg::q8_t x [LANES], w [LANES];
  logic signed [31:0] psum;
  int checks = 0, failures = 0;

  aie_mac_kernel #(.LANES(LANES), .PSUM_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dot();
    int s = 0;
    for (int i = 0; i < LANES; i++) s += int'(x[i]) * int'(w[i]);
    return s;
  endfunction

  initial begin
    int exp_v;
    for (int i = 0; i < LANES; i++) begin x[i] = 0; w[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < LANES; i++) begin
        case (t)
          0: begin x[i] = -128; w[i] = -128; end
          1: begin x[i] = 127;  w[i] = -128; end
          default: begin x[i] = l1_pkg::q8_t'($urandom); w[i] = l1_pkg::q8_t'($urandom); end
        endcase
      end
      exp_v = ref_dot();
      en = 1; in_valid = (t % 3) != 2;
      @(posedge clk); #1;
      checks++;
      if (psum !== exp_v || out_valid !== in_valid) begin
        failures++;
        $display("mismatch t=%0d psum=%0d exp=%0d", t, psum, exp_v);
      end
      // hold with en low
      en = 0;
      for (int i = 0; i < LANES; i++) x[i] = l1_pkg::q8_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (psum !== exp_v) begin failures++; $display("hold failed t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
