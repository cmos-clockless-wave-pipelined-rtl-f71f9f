// End-to-end testbench of the clockless wave-pipelined adder, with every
// parameter at its default (8 bits, 1 GHz operand rate).
//
// After a clear, NW operand pairs are applied back to back, one every
// 1000 ps. Every eighth pair repeats the previous one, so its wave changes
// nothing. Three monitors time the skewed adder outputs, the completion pulse
// and the latched outputs; each event is assigned to its wave from its time.
// Per wave the testbench checks:
//  - the latched result equals a + b (integer addition here) 1600 ps after
//    the operands, i.e. after capture and before the next wave is captured;
//  - a wave whose outputs change gives exactly one completion pulse, starting
//    with the first change and ending 350 ps after the last one, and its
//    result is latched 1050..1350 ps after the operands;
//  - a wave that changes no output gives no pulse and no latch update;
//  - the latched outputs change at a single instant (skew removed).
// Each mechanism must occur at least once: skewed waves (spread >= 200 ps),
// pulses merged over several changing bits, waves without a pulse, and
// aligned latch updates.
`timescale 1ps/1ps
module tb_wave_pipelined_adder;
  localparam int NW = 4000;
  localparam int T = int'(wpa_pkg::IN_PERIOD_PS);   // operand period, 1 GHz
  localparam int PW = int'(wpa_pkg::PULSE_W_PS);    // edge-sensing pulse width

  logic       rst_n;
  logic [7:0] a, b, sum_q, sum_skewed;
  logic       cout_q, cout_skewed, done;

  wave_pipelined_adder dut (
    .rst_n(rst_n), .a(a), .b(b), .sum_q(sum_q), .cout_q(cout_q),
    .sum_skewed(sum_skewed), .cout_skewed(cout_skewed), .done(done)
  );

  int checks = 0, failures = 0;
  int t0;                            // time at which wave 0 is applied
  bit running = 0;

  // Per-wave records.
  int first_chg [NW];
  int last_chg  [NW];
  int n_chg_bits [NW];
  int n_pulse   [NW];
  int pulse_rise [NW];
  int pulse_fall [NW];
  int n_q_upd   [NW];
  logic [8:0] expected [NW];
  logic [8:0] latched  [NW];

  initial begin
    #(longint'(NW) * longint'(T) + 20 * longint'(T));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wave_of(input int t, input int lo);
    // An event between lo+1 and lo+T ps after wave k's operands belongs to k.
    return (t - t0 - lo - 1) / T;
  endfunction

  // Skewed outputs.
  logic [8:0] prev_skewed;
  always @({cout_skewed, sum_skewed}) begin
    if (running && int'($time) > t0) begin
      int k, tr;
      tr = int'($time);
      k = wave_of(tr, 0);
      if (k >= 0 && k < NW) begin
        if (first_chg[k] < 0) first_chg[k] = tr - t0 - k * T;
        last_chg[k] = tr - t0 - k * T;
        n_chg_bits[k] += $countones(prev_skewed ^ {cout_skewed, sum_skewed});
      end
    end
    prev_skewed = {cout_skewed, sum_skewed};
  end

  // Completion pulse.
  always @(posedge done) begin
    if (running && int'($time) > t0) begin
      int k;
      k = wave_of(int'($time), 0);
      if (k >= 0 && k < NW) begin
        n_pulse[k]++;
        if (pulse_rise[k] < 0) pulse_rise[k] = int'($time) - t0 - k * T;
      end
    end
  end
  always @(negedge done) begin
    if (running && int'($time) > t0) begin
      int k;
      k = wave_of(int'($time), T);
      if (k >= 0 && k < NW) pulse_fall[k] = int'($time) - t0 - k * T;
    end
  end

  // Latched outputs: count distinct update instants per wave.
  always @({cout_q, sum_q}) begin
    if (running && int'($time) > t0) begin
      int k;
      k = wave_of(int'($time), T);
      if (k >= 0 && k < NW) n_q_upd[k]++;
    end
  end

  initial begin
    int skewed_waves, merged_waves, quiet_waves, aligned_waves;
    logic [8:0] prev_exp;

    skewed_waves = 0; merged_waves = 0; quiet_waves = 0; aligned_waves = 0;
    for (int k = 0; k < NW; k++) begin
      first_chg[k] = -1; last_chg[k] = -1; n_chg_bits[k] = 0; n_pulse[k] = 0;
      pulse_rise[k] = -1; pulse_fall[k] = -1; n_q_upd[k] = 0;
    end
    rst_n = 1'b0; a = '0; b = '0;
    #(3 * T);
    rst_n = 1'b1;
    #(T);
    checks++;
    if ({cout_q, sum_q} != '0) begin failures++; $display("clear failed"); end
    t0 = int'($time);
    running = 1;

    // Apply the waves; sample the latched word 1600 ps after each.
    fork
      for (int k = 0; k < NW; k++) begin
        if (k % 8 != 7) begin
          a = 8'($urandom); b = 8'($urandom);
        end
        expected[k] = 9'(int'(a) + int'(b));
        #(T);
      end
      begin
        #(T + 600);
        for (int k = 0; k < NW; k++) begin
          latched[k] = {cout_q, sum_q};
          #(T);
        end
      end
    join
    #(3 * T);
    running = 0;

    prev_exp = '0;
    for (int k = 0; k < NW; k++) begin
      checks++;
      if (latched[k] !== expected[k]) begin
        failures++;
        if (failures < 20) $display("wave %0d: latched %0d expected %0d", k, latched[k], expected[k]);
      end
      if (first_chg[k] < 0) begin
        // Nothing changed: no pulse, no latch update.
        checks++;
        quiet_waves++;
        if (n_pulse[k] != 0 || n_q_upd[k] != 0 || expected[k] != prev_exp) begin
          failures++;
          $display("wave %0d: quiet wave with %0d pulses, %0d updates", k, n_pulse[k], n_q_upd[k]);
        end
      end else begin
        checks++;
        if (n_pulse[k] != 1 || pulse_rise[k] != first_chg[k] || pulse_fall[k] != last_chg[k] + PW) begin
          failures++;
          $display("wave %0d: %0d pulses %0d..%0d for changes %0d..%0d",
                   k, n_pulse[k], pulse_rise[k], pulse_fall[k], first_chg[k], last_chg[k]);
        end
        checks++;
        if (pulse_fall[k] < T + 50 || pulse_fall[k] > T + PW) begin
          failures++;
          $display("wave %0d: latched at %0d ps", k, pulse_fall[k]);
        end
        checks++;
        if (n_q_upd[k] > 1 || (n_q_upd[k] == 0 && expected[k] != prev_exp)) begin
          failures++;
          $display("wave %0d: latched word changed %0d times", k, n_q_upd[k]);
        end
        if (last_chg[k] - first_chg[k] >= 200) skewed_waves++;
        if (n_chg_bits[k] >= 2 && last_chg[k] > first_chg[k] && n_pulse[k] == 1) merged_waves++;
        if (last_chg[k] > first_chg[k] && n_q_upd[k] == 1) aligned_waves++;
      end
      prev_exp = expected[k];
    end

    $display("waves %0d: skewed %0d, merged pulses %0d, quiet %0d, aligned %0d",
             NW, skewed_waves, merged_waves, quiet_waves, aligned_waves);
    checks++; if (skewed_waves == 0) begin failures++; $display("no skewed wave"); end
    checks++; if (merged_waves == 0) begin failures++; $display("no merged pulse"); end
    checks++; if (quiet_waves == 0) begin failures++; $display("no quiet wave"); end
    checks++; if (aligned_waves == 0) begin failures++; $display("no aligned update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
