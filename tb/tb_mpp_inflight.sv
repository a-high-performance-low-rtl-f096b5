`timescale 1ps/10fs
// tb_mpp_inflight: the 8x8 mesochronous multiplier with flight times.
//
// The RTL logic has no delays, so this bench rebuilds the multiplier's
// datapath from its own parts (pipe_rank ranks and csa_stage stages, split
// as in mpp_multiplier) and puts a flight time on every bit entering a
// stage: clock-to-q 295 ps plus a logic delay drawn at random, per bit and
// per operand set, between the stage's dmin and dmax. The ranks are clocked
// by the default clock path (mpp_clock_path: 35 ps per stage, i.e. N = 4
// whole periods plus 35 ps) at 350 ps, so a set launched by rank r is
// captured by rank r+1 on the fourth edge after the one that launched it.
//
// Two copies run side by side on the same operands:
//   v = 0: every stage's delay spread is 190 ps (dmin 930, dmax 1120 ps),
//          the limit a 350 ps clock allows. Products must be right, no bit
//          may change within the register setup (10 ps) or hold (130 ps)
//          window, and each stage must hold at least four operand sets at
//          once in its logic (from the end of the launching register's
//          clock-to-q delay to the arrival of the set's last bit).
//   v = 1: four layers whose 70 ps spreads add up (dmin 840 ps): the hold
//          window must be seen violated, so the budget really bites.
// The product of the set captured by rank 0 on input edge n leaves rank 4
// on its edge n + 16.
module tb_mpp_inflight;
  import mpp_pkg::*;
  localparam int unsigned M   = 8;
  localparam int unsigned K   = 4;
  localparam int unsigned SW  = 6*M;
  localparam int unsigned L   = n_layers(M);
  localparam int unsigned T   = T_CLK_MPP_PS;
  localparam int unsigned NP  = 4;                 // whole periods per stage
  localparam int unsigned DR  = SAFF_DR_PS;
  localparam int unsigned TS  = SAFF_TS_PS;
  localparam int unsigned TH  = SAFF_TH_PS;
  localparam int unsigned DMAX = 4*FA_DMAX_PS;     // 1120 ps
  localparam int unsigned SETS = 600;

  int checks = 0, failures = 0;
  int hold_viol [2], setup_viol [2];
  int max_inflight [2][K];

  initial begin
    #(SETS*T + 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock and clock path
  logic clk = 1'b0;
  always #(T/2) clk = ~clk;
  logic [K-1:0][2:0] ctl = '0;
  logic [K:0] clk_rank;
  logic clk_out;
  mpp_clock_path u_path (.clk_in(clk), .ctl(ctl), .clk_rank(clk_rank), .clk_out(clk_out));

  // operands, changed on the falling edge, recorded on the rising edge
  logic [M-1:0] x = '0, y = '0;
  logic [2*M-1:0] expq [$];
  always @(negedge clk) begin
    x = M'($urandom);
    y = M'($urandom);
  end
  always @(posedge clk) expq.push_back((2*M)'(x) * (2*M)'(y));

  for (genvar v = 0; v < 2; v++) begin : g_v
    localparam int unsigned DMIN = (v == 0) ? DMAX - DDIFF_MAX_PS : 4*FA_DMIN_PS;

    logic [SW-1:0] d_t [K+1];
    logic [SW-1:0] d_f [K+1];
    logic [SW-1:0] q_t [K+1];
    logic [SW-1:0] q_f [K+1];
    logic [SW-1:0] qd_t [K];
    logic [SW-1:0] qd_f [K];

    assign d_t[0] = {x,  y,  {(4*M){1'b0}}};
    assign d_f[0] = {~x, ~y, {(4*M){1'b1}}};

    for (genvar r = 0; r <= K; r++) begin : g_rank
      pipe_rank #(.W(SW)) u_rank (.clk(clk_rank[r]), .d_t(d_t[r]), .d_f(d_f[r]), .q_t(q_t[r]), .q_f(q_f[r]));
    end

    for (genvar g = 0; g < K; g++) begin : g_stage
      csa_stage #(.M(M), .LO(rank_layer(g, L, K)), .HI(rank_layer(g+1, L, K))) u_stage (
        .d_t(qd_t[g]), .d_f(qd_f[g]), .q_t(d_t[g+1]), .q_f(d_f[g+1]));

      realtime last_cap = 0.0, last_chg = 0.0;
      int inflight = 0;

      // each bit launched by rank g reaches stage g's inputs after its flight time
      always @(posedge clk_rank[g]) begin
        #1;
        launch();
      end

      task automatic launch();
        int unsigned last = 0;
        for (int b = 0; b < SW; b++) begin
          automatic int bb = b;
          automatic int unsigned dl = DR + $urandom_range(DMIN, DMAX) - 1;
          automatic logic vt = q_t[g][b];
          automatic logic vf = q_f[g][b];
          if (dl > last) last = dl;
          fork
            begin
              #(dl);
              if (qd_t[g][bb] != vt) begin
                last_chg = $realtime;
                if ($realtime - last_cap < real'(TH)) hold_viol[v]++;
              end
              qd_t[g][bb] = vt;
              qd_f[g][bb] = vf;
            end
          join_none
        end
        fork
          begin
            #(DR - 1);
            inflight++;
            if (inflight > max_inflight[v][g]) max_inflight[v][g] = inflight;
            #(last - (DR - 1));
            inflight--;
          end
        join_none
      endtask

      // rank g+1 captures: nothing may have changed within its setup time
      always @(posedge clk_rank[g+1]) begin
        if ($realtime > real'(2*NP*T) && $realtime - last_chg < real'(TS)) setup_viol[v]++;
        last_cap = $realtime;
      end
    end
  end

  // products leave rank K on the edge NP*K after the one that took the operands
  int e_out = -1;
  always @(posedge clk_rank[K]) begin
    e_out++;
    #1;
    if (e_out >= int'(NP*K) + 2 && e_out - int'(NP*K) < expq.size()) begin
      checks++;
      if (g_v[0].q_t[K][4*M-1:2*M] !== expq[e_out - NP*K] ||
          ~g_v[0].q_f[K][4*M-1:2*M] !== expq[e_out - NP*K]) begin
        failures++;
        $display("FAIL set %0d: product %0d expected %0d", e_out - NP*K,
                 g_v[0].q_t[K][4*M-1:2*M], expq[e_out - NP*K]);
      end
    end
  end

  initial begin
    repeat (SETS) @(posedge clk);
    #(T/4);
    checks++;
    if (hold_viol[0] != 0 || setup_viol[0] != 0) begin
      failures++;
      $display("FAIL 190 ps spread: %0d hold and %0d setup violations", hold_viol[0], setup_viol[0]);
    end
    for (int g = 0; g < K; g++) begin
      checks++;
      if (max_inflight[0][g] < 4) begin
        failures++;
        $display("FAIL stage %0d held at most %0d operand sets", g, max_inflight[0][g]);
      end
    end
    checks++;
    if (hold_viol[1] == 0) begin
      failures++;
      $display("FAIL 280 ps spread produced no hold violation");
    end
    $display("operand sets in flight per stage (most at once): %0d %0d %0d %0d",
             max_inflight[0][0], max_inflight[0][1], max_inflight[0][2], max_inflight[0][3]);
    $display("hold violations: %0d at 190 ps spread, %0d at 280 ps spread", hold_viol[0], hold_viol[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
