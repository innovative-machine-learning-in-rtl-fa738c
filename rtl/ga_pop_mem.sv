// ga_pop_mem: population memory of the genetic-algorithm engine.
//
// Holds DEPTH chromosomes of W bits. One synchronous write port and NRD
// asynchronous read ports, so the fitness unit can read NRD individuals in the
// same clock and the selection unit its tournament entrants. The engine uses
// two instances as current and next generation (ping-pong).
// Timing: a write is visible on the read ports from the next clock.
// Contents are not reset; the engine writes every entry before reading it.
// Storing the population on chip with single-cycle access follows the
// reference design; the multi-port register-file form is this
// implementation's choice.
module ga_pop_mem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 16,
  parameter int unsigned NRD   = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr [NRD],
  output logic [W-1:0]             rdata [NRD]
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int unsigned i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];
  end
endmodule
