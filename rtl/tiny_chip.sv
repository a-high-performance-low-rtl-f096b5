`timescale 1ps/10fs
// tiny_chip: the 4x4-bit mesochronous multiplier test chip.
//
// A 4x4 carry-save multiplier (8 adder layers) runs as a mesochronous
// pipeline of only 2 logic stages and 3 register ranks at the chip's
// fastest clock. A conventional pipeline would need 4 stages and 5 ranks
// with a global clock tree for the same rate. Everything at system speed is
// on chip, because a chip tester cannot supply or capture data that fast:
//   * ring_osc_clkgen makes the system clock, period chosen by S1, S0;
//   * clk_div_jk divides it by 2^18 onto the clk_mon pin;
//   * the input bank (io_bank) is loaded slowly from outside through
//     wr_clk / wr_en / wr_addr / wr_x / wr_y;
//   * a rising edge on run (synchronised to the system clock) makes the
//     sequencer read all DEPTH input words back to back at system speed into
//     the multiplier, one per clock;
//   * each product is written at system speed into the output bank, at the
//     address of its operands, and read slowly through rd_addr / rd_prod.
// The clock path (mpp_clock_path) feeds ranks 0, 1, 2 and then the output
// bank, so the bank write travels with the data like any rank.
//
// Own choices where the chip description is silent: the operand address and
// a valid bit travel beside the data in extra register bits of each rank (so
// each product finds its address without counting latency); the banks hold
// 16 words; the register cell is the dynamic two-phase flip-flop; rst
// (asynchronous, active high) clears the sequencer and the divider; the
// stages split the 8 layers 4 + 4; the clock-path delays are 900 ps and
// 1350 ps, the parts of the stage delays (2.85 ns and 3.3 ns) beyond one
// 1.95 ns period (N = 1 for both stages).
// The oscillator periods T11_PS..T00_PS are the simulated 1.95, 2.22, 2.51
// and 2.88 ns. The fabricated chip ran about 2.05 times slower (3.97, 4.62,
// 5.11, 5.95 ns, stage delays 5.84 and 6.76 ns); that chip is modelled by
// overriding the periods and setting DELTA_PS to {1870.0, 2790.0}.
// busy is high while the sequencer is issuing operands; the last product
// reaches the output bank K+1 system clocks later.
module tiny_chip
  import mpp_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned K     = 2,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DIV_N = 18,
  parameter real DELTA_PS [K]  = '{900.0, 1350.0},
  parameter int unsigned N [K] = '{1, 1},
  parameter real T11_PS        = 1950.0,
  parameter real T10_PS        = 2220.0,
  parameter real T01_PS        = 2510.0,
  parameter real T00_PS        = 2880.0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic           rst,
  input  logic           s1, s0,
  // slow operand load
  input  logic           wr_clk,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  logic [M-1:0]   wr_x, wr_y,
  // start of an at-speed run
  input  logic           run,
  output logic           busy,
  // slow result read
  input  logic [AW-1:0]  rd_addr,
  output logic [2*M-1:0] rd_prod,
  // clocks
  output logic           clk_mon,
  output logic           clk_sys
);
  logic [K:0]     clk_rank;
  logic           clk_last;
  logic [2*M-1:0] in_word;
  logic [AW-1:0]  seq_addr;
  logic           seq_valid;
  logic [2*M-1:0] prod, prod_n;
  logic [DIV_N-1:0] div_q;

  // ---------------------------------------------------------------- clocks
  ring_osc_clkgen #(.T11_PS(T11_PS), .T10_PS(T10_PS), .T01_PS(T01_PS), .T00_PS(T00_PS)) u_osc (.s1(s1), .s0(s0), .clock(clk_sys));

  mpp_clock_path #(.K(K), .DELTA_PS(DELTA_PS), .N(N), .TUNABLE(1'b0)) u_cpath (
    .clk_in(clk_sys), .ctl('0), .clk_rank(clk_rank), .clk_out(clk_last));

  clk_div_jk #(.N(DIV_N)) u_div (.clk_in(clk_sys), .rst(rst), .clk_out(clk_mon), .q(div_q));

  // ---------------------------------------------------------- input bank
  io_bank #(.WIDTH(2*M), .DEPTH(DEPTH)) u_inbank (
    .wclk(wr_clk), .we(wr_en), .waddr(wr_addr), .wdata({wr_y, wr_x}),
    .raddr(seq_addr), .rdata(in_word));

  // ------------------------------------------------ at-speed sequencer
  logic [1:0] run_sync;
  logic       run_seen;

  always_ff @(posedge clk_rank[0] or posedge rst) begin
    if (rst) begin
      run_sync  <= '0;
      run_seen  <= 1'b0;
      seq_addr  <= '0;
      seq_valid <= 1'b0;
    end else begin
      run_sync <= {run_sync[0], run};
      run_seen <= run_sync[1];
      if (run_sync[1] && !run_seen) begin
        seq_addr  <= '0;
        seq_valid <= 1'b1;
      end else if (seq_valid) begin
        if (seq_addr == AW'(DEPTH-1)) seq_valid <= 1'b0;
        else                          seq_addr  <= seq_addr + 1'b1;
      end
    end
  end

  assign busy = seq_valid;

  // ---------------------------------------------------------- multiplier
  mpp_multiplier #(.M(M), .K(K), .FF(FF_DYN)) u_mult (
    .clk_rank(clk_rank), .x(in_word[M-1:0]), .y(in_word[2*M-1:M]),
    .p(prod), .p_n(prod_n));

  // Address and valid bit ride along in the same ranks' clocks.
  localparam int unsigned TW = AW + 1;
  logic [TW-1:0] tag_t [K+1];
  logic [TW-1:0] tag_f [K+1];

  for (genvar r = 0; r <= K; r++) begin : g_tag
    if (r == 0) begin : g_first
      pipe_rank #(.W(TW), .FF(FF_DYN)) u_tag (
        .clk(clk_rank[0]), .d_t({seq_valid, seq_addr}), .d_f(~{seq_valid, seq_addr}),
        .q_t(tag_t[0]), .q_f(tag_f[0]));
    end else begin : g_next
      pipe_rank #(.W(TW), .FF(FF_DYN)) u_tag (
        .clk(clk_rank[r]), .d_t(tag_t[r-1]), .d_f(tag_f[r-1]),
        .q_t(tag_t[r]), .q_f(tag_f[r]));
    end
  end

  // --------------------------------------------------------- output bank
  // Written on the clock that leaves the last rank: it takes the product
  // and tag that rank K holds from its previous edge.
  io_bank #(.WIDTH(2*M), .DEPTH(DEPTH)) u_outbank (
    .wclk(clk_last), .we(tag_t[K][AW]), .waddr(tag_t[K][AW-1:0]), .wdata(prod),
    .raddr(rd_addr), .rdata(rd_prod));
endmodule
