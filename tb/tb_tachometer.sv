// tb_tachometer: end-to-end test of the whole tachometer at its default sizes
// (1 MHz clock, 4 ms and 250 ms windows, divide-by-33 counting clock).
//
// The bench plays ignition pulse trains for a series of engine speeds
// (rpm = 30 x pulse frequency, so the pulse period is 30e6/rpm clock cycles)
// and records the cycle of every sensor rising edge. For each 250 ms gate the
// expected count is worked out from those edges alone: each edge opens a
// 4000-cycle window that ends early at the next edge or at the end of the
// gate, and the count must be the enabled time divided by 33, within one
// count per window. For gates at a steady speed the count must also be close
// to the speed in rpm (one window's worth, 121, plus 2 %). Speeds above
// 7500 rpm give overlapping windows, so the counter runs for the whole gate:
// 250000 / 33 = 7575 counts. The gate must last 250000 cycles, the register
// must change only in the write cycles, and the LED bar must show the range
// of the register value.
//
// Each mechanism must happen at least once: gate closed while the short window
// was open (window cut short), pause between short windows, window restarted
// by a pulse, register write, counter reset, and the table's lowest, middle
// and highest rows. The count of each is printed.
module tb_tachometer;
  import tacho_pkg::*;

  localparam int L   = 250000;
  localparam int S   = 4000;
  localparam int DIV = 33;

  logic      clk = 1'b0, rst_n = 1'b0, sensor_in = 1'b0;
  led_code_t led;
  count_t    reg_out;
  int        checks = 0, failures = 0;

  tachometer dut (.clk, .rst_n, .sensor_in, .led, .reg_out);

  always #500 clk = ~clk;   // 1 MHz

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus bookkeeping -------------------------------------------
  longint cyc = 0;
  longint edges[$];             // cycle of each sensor rising edge
  int     cur_rpm = 0;
  int     seg_id  = 0;          // increments at each speed change

  always @(posedge clk) cyc++;

  // ---- mechanism counters ---------------------------------------------
  int n_gates = 0, n_cut = 0, n_pause = 0, n_retrig = 0, n_write = 0, n_reset = 0;
  int n_low = 0, n_mid = 0, n_high = 0, n_steady = 0;

  function automatic int expected_k(int v);
    return (v < 700) ? 0 : (v >= 6100) ? 28 : (v - 700) / 200 + 1;
  endfunction

  // enabled cycles in the gate that starts at edge gs
  function automatic longint enabled_cycles(longint gs, output int nwin);
    longint e = 0, stop, gend;
    gend = gs + L;
    nwin = 0;
    foreach (edges[i]) begin
      if (edges[i] < gs || edges[i] >= gend) continue;
      stop = edges[i] + S;
      if (i + 1 < edges.size() && edges[i+1] < stop) stop = edges[i+1];
      if (gend < stop) stop = gend;
      e += stop - edges[i];
      nwin++;
    end
    return e;
  endfunction

  // ---- monitor ---------------------------------------------------------
  logic        a1_q = 1'b0, a2_q = 1'b0, sens_q = 1'b0, wr_q = 1'b0;
  mgmt_state_t st_q = NACHALO;
  longint      gate_start_edge = 0, gate_rise_cyc = 0;
  int          gate_seg = 0, gate_rpm = 0;
  count_t      reg_before = '0;

  always @(posedge clk) if (rst_n) begin
    logic        a1, a2, wr;
    mgmt_state_t st;
    a1 = dut.counter250ms_out;
    a2 = dut.counter4ms_out;
    wr = dut.register_ena;
    st = dut.u_management.state;

    if (dut.sensor_s && !sens_q && a2) n_retrig++;
    if (st == PAUSE && st_q != PAUSE) n_pause++;
    if (st == ZAPIS_A && st_q == COUNT) n_cut++;
    if (st == NACHALO && st_q == ZAPIS_B && dut.counter14bit_out != 0) n_reset++;

    // register may change only while written
    if (!wr_q) begin
      checks++;
      if (reg_out !== reg_before) begin failures++; $display("register changed outside write"); end
    end

    if (a1 && !a1_q) begin
      gate_start_edge = edges[$];
      gate_rise_cyc   = cyc;
      gate_seg        = seg_id;
      gate_rpm        = cur_rpm;
      checks++;
      if (cyc - gate_start_edge > 5) begin
        failures++; $display("gate opened %0d cycles after the edge", cyc - gate_start_edge);
      end
    end
    if (!a1 && a1_q) begin
      n_gates++;
      checks++;
      if (cyc - gate_rise_cyc != L) begin
        failures++; $display("gate lasted %0d cycles", cyc - gate_rise_cyc);
      end
    end

    // write finished: check the measurement
    if (!wr && wr_q) begin
      int     nwin, v, k, lit;
      longint e;
      n_write++;
      e = enabled_cycles(gate_start_edge, nwin);
      v = int'(reg_out);
      checks++;
      if (v < e / DIV - nwin - 1 || v > e / DIV + nwin + 1) begin
        failures++;
        $display("count %0d, expected %0d +- %0d (enabled %0d cycles)", v, e / DIV, nwin + 1, e);
      end
      if (gate_seg == seg_id && gate_rpm > 0) begin
        n_steady++;
        checks++;
        if (gate_rpm <= 7000) begin
          if (v < gate_rpm - 121 - gate_rpm / 50 || v > gate_rpm + 121 + gate_rpm / 50) begin
            failures++; $display("rpm %0d measured as %0d", gate_rpm, v);
          end
        end else if (v < L / DIV - 1 || v > L / DIV + 1) begin
          failures++; $display("rpm %0d: expected %0d counts, got %0d", gate_rpm, L / DIV, v);
        end
        $display("speed %5d rpm: count %5d (%0d windows)", gate_rpm, v, nwin);
      end
      k = expected_k(v);
      lit = $countones(led[BAR_LEDS-1:0]);
      checks++;
      if (lit != k || led[BAR_LEDS-1:0] != BAR_LEDS'((64'd1 << k) - 1)) begin
        failures++; $display("count %0d lights %0d bar LEDs, expected %0d", v, lit, k);
      end
      if (k == 0) n_low++; else if (k == 28) n_high++; else n_mid++;
    end

    if (!wr) reg_before = reg_out;
    a1_q = a1; a2_q = a2; wr_q = wr; st_q = st; sens_q = dut.sensor_s;
  end

  // ---- stimulus --------------------------------------------------------
  task automatic run_speed(int rpm, longint cycles);
    int     period, high;
    longint t0;
    period  = 30_000_000 / rpm;
    high    = (period / 2 < 1000) ? period / 2 : 1000;
    cur_rpm = rpm;
    seg_id++;
    t0 = cyc;
    while (cyc - t0 < cycles) begin
      sensor_in = 1'b1;
      edges.push_back(cyc);
      repeat (high) @(negedge clk);
      sensor_in = 1'b0;
      repeat (period - high) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);
    run_speed(500,  600_000);
    run_speed(1000, 600_000);
    run_speed(4000, 600_000);
    run_speed(5200, 600_000);
    run_speed(6500, 600_000);
    run_speed(9000, 600_000);
    cur_rpm = 0; seg_id++;
    repeat (L + 100) @(negedge clk);

    $display("gates=%0d writes=%0d steady=%0d cut_short=%0d pauses=%0d restarts=%0d counter_resets=%0d rows(low/mid/high)=%0d/%0d/%0d",
             n_gates, n_write, n_steady, n_cut, n_pause, n_retrig, n_reset, n_low, n_mid, n_high);
    checks++; if (n_gates  == 0) begin failures++; $display("no gate closed"); end
    checks++; if (n_write  == 0) begin failures++; $display("no register write"); end
    checks++; if (n_steady <  6) begin failures++; $display("too few steady-speed gates"); end
    checks++; if (n_cut    == 0) begin failures++; $display("no window cut short by the gate"); end
    checks++; if (n_pause  == 0) begin failures++; $display("no pause between windows"); end
    checks++; if (n_retrig == 0) begin failures++; $display("no window restarted"); end
    checks++; if (n_reset  == 0) begin failures++; $display("no counter reset"); end
    checks++; if (n_low == 0 || n_mid == 0 || n_high == 0) begin failures++; $display("table rows not all used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
