`timescale 1ps/10fs
// tb_mpp_clock_path: the rank clocks of a 4-stage clock path trail one
// another by the stage delays: fixed only (35 ps per stage) and fixed plus
// variable trim (code per stage). Every rank sees every input edge, in
// order, with the period unchanged.
module tb_mpp_clock_path;
  logic clk = 1'b0;
  logic [3:0][2:0] ctl;
  logic [4:0] rk_f, rk_t;
  logic co_f, co_t;
  int checks = 0, failures = 0;

  mpp_clock_path dut_f (.clk_in(clk), .ctl('0), .clk_rank(rk_f), .clk_out(co_f));
  mpp_clock_path #(.K(4), .DELTA_PS('{10.0, 20.0, 30.0, 40.0}), .N('{4, 4, 4, 4}), .TUNABLE(1'b1))
    dut_t (.clk_in(clk), .ctl(ctl), .clk_rank(rk_t), .clk_out(co_t));

  always #175 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real vd(input logic [2:0] c);
    case (32'(c[0]) + 32'(c[1]) + 32'(c[2]))
      0, 1: return 139.94;
      2:    return 110.81;
      default: return 96.03;
    endcase
  endfunction

  realtime t_edge;
  int cycles = 0;
  always @(posedge clk) begin
    t_edge = $realtime;
    cycles++;
  end

  // measure, for each rank, the time from the input edge to its edge
  for (genvar r = 1; r <= 4; r++) begin : g_meas
    realtime t_seen;
    always @(posedge rk_f[r]) if (cycles > 2) begin
      checks++;
      t_seen = $realtime - t_edge;
      if (t_seen < 35.0*r - 0.01 || t_seen > 35.0*r + 0.01) begin
        failures++;
        $display("FAIL fixed path rank %0d offset %0.2f", r, t_seen);
      end
    end
  end

  realtime exp_t [5];
  always_comb begin
    exp_t[0] = 0.0;
    exp_t[1] = 10.0 + vd(ctl[0]);
    exp_t[2] = exp_t[1] + 20.0 + vd(ctl[1]);
    exp_t[3] = exp_t[2] + 30.0 + vd(ctl[2]);
    exp_t[4] = exp_t[3] + 40.0 + vd(ctl[3]);
  end

  // With trims the path is longer than one period (two edges in flight),
  // so check the phase: input rising edges fall at 175 + 350*k ps, an output
  // rising edge must come exp_t[4] after one of them. Also count the edges.
  int n_out = 0;
  int n_in_flight_2 = 0;
  bit settling = 1'b0;
  always @(posedge co_t) if (cycles > 4 && !settling) begin
    realtime ph;
    ph = $realtime - exp_t[4] - 175.0;
    ph = ph - 350.0 * $floor((ph + 0.005) / 350.0);
    checks++;
    if (ph > 0.01) begin
      failures++;
      $display("FAIL tunable path phase %0.2f (total %0.2f)", ph, exp_t[4]);
    end
    if (exp_t[4] > 350.0) n_in_flight_2++;
    n_out++;
  end

  initial begin
    ctl = {3'b001, 3'b011, 3'b111, 3'b001};
    wait (n_out >= 50);
    // retune: the clock is stopped while the trims change
    @(negedge clk);
    settling = 1'b1;
    ctl = {3'b111, 3'b111, 3'b011, 3'b011};
    // edges already inside the path still see the old delays: skip them
    settling = 1'b1;
    repeat (3) @(posedge clk);
    settling = 1'b0;
    n_out = 0;
    wait (n_out >= 50);
    checks++;
    if (n_in_flight_2 == 0) begin
      failures++;
      $display("FAIL no case with two clock edges inside the path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
