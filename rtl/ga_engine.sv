// ga_engine: genetic-algorithm engine for in-situ parameter tuning.
//
// Evolves a population of POP chromosomes of CW bits (for instance a
// discrimination threshold of the DAQ) towards maximal fitness, entirely in
// logic under one FSM:
//   INIT   POP random chromosomes from an LFSR, one per clock;
//   EVAL   FIT_LANES individuals per clock through the parallel fitness unit;
//          fitness values are stored and the best individual is tracked;
//   BREED  one child per clock: the best individual is copied unchanged to
//          slot 0 (elitism); every other slot gets a child from two binary
//          tournaments (four random entrants), crossover and mutation;
//   then the generations swap (two population memories used ping-pong) and
//   EVAL follows, until cfg_gens generations have been bred.
// Run-time registers: mutation rate and crossover probability (in 1/256),
// fitness target, number of generations and LFSR seed; they are sampled at
// `start`, so they can be changed between runs without new hardware.
// Interface: pulse `start`; `busy` while running; `done` rises at the end and
// stays until the next start; `best_chrom`/`best_fit` hold the best individual
// of the last evaluation, `gen` the generations bred so far.
// Timing: `done` rises (cfg_gens + 1) * (POP + POP/FIT_LANES + 2) clocks
// after the edge that samples `start` (INIT or BREED: POP clocks; EVAL:
// POP/FIT_LANES groups plus the 2-clock fitness pipeline), i.e. 42 clocks
// per generation with the defaults.
// POP must be a power of two and a multiple of FIT_LANES.
// The module set (population memory, parallel fitness, tournament selection,
// crossover, LFSR mutation, FSM, run-time registers) follows the reference
// design; population size, widths, elitism and the fitness function are this
// implementation's choices.
module ga_engine #(
  parameter int unsigned POP       = 32,
  parameter int unsigned CW        = 16,
  parameter int unsigned FIT_LANES = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [7:0]    cfg_mut_rate,
  input  logic [7:0]    cfg_xover_prob,
  input  logic [CW-1:0] cfg_target,
  input  logic [15:0]   cfg_gens,
  input  logic [31:0]   cfg_seed,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] best_chrom,
  output logic [31:0]   best_fit,
  output logic [15:0]   gen
);
  localparam int unsigned IW     = $clog2(POP);
  localparam int unsigned NGROUP = POP / FIT_LANES;
  localparam int unsigned NRD    = (FIT_LANES > 4) ? FIT_LANES : 4;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_EVAL, S_BREED} state_e;
  state_e st;

  // configuration registers
  logic [7:0]    r_mut, r_xov;
  logic [CW-1:0] r_target;
  logic [15:0]   r_gens;

  // randomness
  logic [31:0] ra, rb;
  logic        r_load, r_en;
  lfsr32 u_ra (.clk, .rst_n, .en(r_en), .load(r_load), .seed(cfg_seed), .value(ra));
  lfsr32 u_rb (.clk, .rst_n, .en(r_en), .load(r_load), .seed(~cfg_seed), .value(rb));

  // population memories
  logic           cur;
  logic [IW-1:0]  k;
  logic [IW-1:0]  raddr [NRD];
  logic [CW-1:0]  rdata0 [NRD], rdata1 [NRD], rdata [NRD];
  logic           we0, we1;
  logic [CW-1:0]  wdata;

  ga_pop_mem #(.DEPTH(POP), .W(CW), .NRD(NRD)) u_pop0 (
    .clk, .we(we0), .waddr(k), .wdata, .raddr, .rdata(rdata0));
  ga_pop_mem #(.DEPTH(POP), .W(CW), .NRD(NRD)) u_pop1 (
    .clk, .we(we1), .waddr(k), .wdata, .raddr, .rdata(rdata1));
  assign rdata = cur ? rdata1 : rdata0;

  // fitness
  logic [31:0]   fit_mem [POP];
  logic          fu_in_valid, fu_out_valid;
  logic [CW-1:0] fu_chrom [FIT_LANES];
  logic [31:0]   fu_fit [FIT_LANES];
  logic [IW-1:0] grp_q1, grp_q2;
  logic [CW-1:0] ch_q1 [FIT_LANES], ch_q2 [FIT_LANES];
  logic [IW:0]   n_res;
  logic          k_done;   // all groups issued in EVAL

  ga_fitness_unit #(.LANES(FIT_LANES), .CW(CW)) u_fit (
    .clk, .rst_n, .in_valid(fu_in_valid), .chrom(fu_chrom), .target(r_target),
    .out_valid(fu_out_valid), .fit(fu_fit));

  // selection, crossover, mutation
  logic [CW-1:0] cand_chrom [4];
  logic [31:0]   cand_fit [4];
  logic [CW-1:0] xchild, mchild;
  logic [IW-1:0] cidx [4];

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) begin
      cidx[i]       = IW'(ra >> (i * IW));
      cand_chrom[i] = rdata[i];
      cand_fit[i]   = fit_mem[cidx[i]];
    end
  end

  ga_select_xover #(.CW(CW)) u_sel (
    .cand_chrom, .cand_fit, .xover_prob(r_xov), .rnd(rb[11:0]), .child(xchild));
  ga_mutate #(.CW(CW)) u_mut (
    .child_in(xchild), .rate(r_mut), .rnd(rb[23:12]), .child_out(mchild));
  // rb[31:24] are left unused on purpose: 24 random bits per child suffice

  // read addresses and write data
  always_comb begin
    for (int unsigned i = 0; i < NRD; i++) begin
      if (st == S_EVAL) raddr[i] = IW'(k * FIT_LANES + i);
      else              raddr[i] = (i < 4) ? cidx[i % 4] : '0;
    end
    for (int unsigned l = 0; l < FIT_LANES; l++) fu_chrom[l] = rdata[l];
    fu_in_valid = (st == S_EVAL) && (32'(k) < NGROUP) && !k_done;
    r_load = (st == S_IDLE) && start;
    r_en   = (st == S_INIT) || (st == S_BREED);
    wdata  = '0;
    we0    = 1'b0;
    we1    = 1'b0;
    if (st == S_INIT) begin
      wdata = ra[CW-1:0];
      we0   = !cur;
      we1   = cur;
    end else if (st == S_BREED) begin
      wdata = (k == '0) ? best_chrom : mchild;
      we0   = cur;
      we1   = !cur;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      busy       <= 1'b0;
      done       <= 1'b0;
      cur        <= 1'b0;
      k          <= '0;
      k_done     <= 1'b0;
      n_res      <= '0;
      gen        <= '0;
      best_chrom <= '0;
      best_fit   <= '0;
      r_mut      <= '0;
      r_xov      <= '0;
      r_target   <= '0;
      r_gens     <= '0;
      grp_q1     <= '0;
      grp_q2     <= '0;
      for (int unsigned l = 0; l < FIT_LANES; l++) begin
        ch_q1[l] <= '0;
        ch_q2[l] <= '0;
      end
      for (int unsigned i = 0; i < POP; i++) fit_mem[i] <= '0;
    end else begin
      // fitness pipeline side-band (2 clocks, like the fitness unit)
      grp_q1 <= k;
      grp_q2 <= grp_q1;
      ch_q1  <= fu_chrom;
      ch_q2  <= ch_q1;

      unique case (st)
        S_IDLE: if (start) begin
          st       <= S_INIT;
          busy     <= 1'b1;
          done     <= 1'b0;
          k        <= '0;
          gen      <= '0;
          cur      <= 1'b0;
          r_mut    <= cfg_mut_rate;
          r_xov    <= cfg_xover_prob;
          r_target <= cfg_target;
          r_gens   <= cfg_gens;
        end
        S_INIT: begin
          k <= k + 1'b1;
          if (32'(k) == POP - 1) begin
            st       <= S_EVAL;
            k        <= '0;
            k_done   <= 1'b0;
            n_res    <= '0;
            best_fit <= '0;
          end
        end
        S_EVAL: begin
          if (!k_done) begin
            if (32'(k) == NGROUP - 1) k_done <= 1'b1;
            else                      k <= k + 1'b1;
          end
          if (fu_out_valid) begin
            logic [31:0]   bf;
            logic [CW-1:0] bc;
            bf = (n_res == '0) ? 32'd0 : best_fit;
            bc = best_chrom;
            for (int unsigned l = 0; l < FIT_LANES; l++) begin
              fit_mem[32'(grp_q2) * FIT_LANES + l] <= fu_fit[l];
              if (fu_fit[l] > bf || (n_res == '0 && l == 0)) begin
                bf = fu_fit[l];
                bc = ch_q2[l];
              end
            end
            best_fit   <= bf;
            best_chrom <= bc;
            n_res      <= n_res + 1'b1;
            if (32'(n_res) == NGROUP - 1) begin
              k <= '0;
              if (gen == r_gens) begin
                st   <= S_IDLE;
                busy <= 1'b0;
                done <= 1'b1;
              end else begin
                st <= S_BREED;
              end
            end
          end
        end
        S_BREED: begin
          k <= k + 1'b1;
          if (32'(k) == POP - 1) begin
            st     <= S_EVAL;
            cur    <= ~cur;
            gen    <= gen + 1'b1;
            k      <= '0;
            k_done <= 1'b0;
            n_res  <= '0;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
