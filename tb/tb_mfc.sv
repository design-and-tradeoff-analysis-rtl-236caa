`timescale 1ps/1ps
// tb_mfc: end-to-end test of the multi-frequency clocking circuit at its
// default parameters (eight CARRY4 blocks, 32 frequencies, 50 ps MUXCY).
// A bufg_model closes the ring (clk -> data_in, 1500 ps).
//
// A reference model in the testbench follows the hopping rule on every
// rising edge of the carry-chain output: after `threshold` cycles at one
// frequency the index steps up by one and wraps after 31. Every clock
// period between two such edges must equal Eq. (1):
//   CCT_i = 31840 ps + i * 100 ps.
// Also checked: freq_sel and sin follow the reference, the average cycle
// over a full sweep, clk holds at 1 while en is 0, and the ring restarts.
// Mechanisms counted (each must happen): frequency switches, wrap-arounds,
// every one of the 32 frequencies measured, stop by en, restart by en,
// threshold change while stopped. At every edge of data_in the select word
// must have been stable for at least the AND gate plus inverter chain delay
// (the timing constraint of Eq. (3)).
module tb_mfc;
  import mfc_pkg::*;

  localparam int unsigned NF    = 32;
  localparam int unsigned STEP  = 2 * D_MUXCY_PS_DEF;   // 100 ps per index
  // twice the expected average cycle over a sweep: 2*BCCT + (NF-1)*STEP
  localparam int unsigned SWEEP2 = 2 * BCCT_PS + (NF - 1) * STEP;

  logic        en, rst_n;
  logic [8:0]  sw_threshold;
  logic        data_in, clk, cout;
  logic [4:0]  freq_sel;
  logic [31:0] sin;

  int checks = 0, failures = 0;
  int stop_edges = 0;
  int n_switch = 0, n_wrap = 0, n_stop = 0, n_restart = 0, n_thr_change = 0;
  bit seen [NF];

  mfc dut (.en, .rst_n, .sw_threshold, .data_in, .clk, .cout, .freq_sel, .sin);
  bufg_model #(.T_BUFG_PS(T_BUFG_PS_DEF)) u_bufg (.i(clk), .o(data_in));

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- reference model and period measurement ----------------
  int unsigned ref_idx = 0, ref_held = 0;
  realtime     last_edge;
  bit          have_last = 0;          // previous edge valid for a period
  int unsigned prev_idx;
  longint      sum_ps = 0;
  int          n_periods = 0;
  bit          measure_sweep = 0;
  longint      sweep_sum = 0;
  int          sweep_n = 0;

  bit          started = 0;            // edges before reset release are ignored

  always @(posedge cout) if (started) begin
    realtime now;
    int unsigned hold;
    now = $realtime;
    if (have_last && en) begin
      check(now - last_edge == BCCT_PS + prev_idx * STEP,
            $sformatf("period at index %0d is %0t ps, expected %0d",
                      prev_idx, now - last_edge, BCCT_PS + prev_idx * STEP));
      seen[prev_idx] = 1;
      if (measure_sweep) begin
        sweep_sum += longint'(now - last_edge);
        sweep_n++;
      end
    end
    // reference update on this edge
    hold = (sw_threshold == 0) ? 1 : int'(sw_threshold);
    ref_held++;
    if (ref_held >= hold) begin
      ref_held = 0;
      n_switch++;
      if (ref_idx == NF - 1) n_wrap++;
      ref_idx = (ref_idx + 1) % NF;
    end
    #1;
    check(freq_sel == 5'(ref_idx), $sformatf("freq_sel=%0d ref=%0d", freq_sel, ref_idx));
    check(sin == (32'hFFFF_FFFF >> ref_idx), $sformatf("sin=%h for index %0d", sin, ref_idx));
    prev_idx  = ref_idx;
    last_edge = now;
    have_last = en;
  end

  // ---------------- Eq. (3): select settled before the next data edge -----
  // The select word may only change while the edge that caused the change is
  // still on its way around the AND gate, inverters and clock buffer.
  realtime last_sin_change = 0;
  int      n_eq3 = 0;
  always @(sin) last_sin_change = $realtime;
  always @(data_in) if (started && en) begin
    check($realtime - last_sin_change >= T_AND_PS_DEF + N_INV_DEF * T_INV_PS_DEF,
          $sformatf("select changed %0t ps before a data edge", $realtime - last_sin_change));
    n_eq3++;
  end

  // ---------------- stimulus ----------------
  initial begin
    en = 0; rst_n = 1; sw_threshold = 9'd3;
    #100 rst_n = 0;
    #100_000;                 // ring settles from its random start in reset
    check(clk == 1 && cout == 1, "ring not at rest while disabled");
    check(freq_sel == 0, "index not reset");
    rst_n = 1;
    started = 1;
    #10_000;

    // run: two full sweeps at threshold 3, averaging the second one
    en = 1;
    // (set and cleared between edges so each window holds whole periods)
    repeat (NF * 3 + 1) @(posedge cout);
    @(negedge cout) measure_sweep = 1;
    repeat (NF * 3) @(posedge cout);
    @(negedge cout) measure_sweep = 0;
    // average of one sweep: BCCT + (NF-1)/2 * STEP
    check(sweep_n == NF * 3, $sformatf("sweep periods %0d", sweep_n));
    check(sweep_sum * 2 == longint'(sweep_n) * longint'(SWEEP2),
          $sformatf("sweep average %0d/%0d ps", sweep_sum, sweep_n));
    $display("average cycle over a sweep: %0.2f ps (base %0d ps)",
             real'(sweep_sum) / sweep_n, BCCT_PS);

    // stop the ring
    @(negedge clk);
    en = 0;
    #100_000;
    begin
      fork
        begin : watch
          forever begin @(clk); stop_edges++; end
        end
        #1_000_000;
      join_any
      disable watch;
      check(stop_edges == 0 && clk == 1,
            $sformatf("ring ran while disabled (%0d edges)", stop_edges));
      if (stop_edges == 0) n_stop++;
    end

    // change the threshold while stopped, then restart
    sw_threshold = 9'd1;
    n_thr_change++;
    #10_000;
    en = 1;
    repeat (2 * NF + 3) @(posedge cout);
    n_restart++;

    // threshold 0 behaves like 1
    @(negedge clk) en = 0;
    #200_000;
    sw_threshold = 9'd0;
    n_thr_change++;
    en = 1;
    repeat (NF + 2) @(posedge cout);

    // ---------------- mechanism coverage ----------------
    begin
      automatic int n_seen = 0;
      foreach (seen[k]) n_seen += seen[k];
      $display("switches=%0d wraps=%0d frequencies_seen=%0d stops=%0d restarts=%0d threshold_changes=%0d",
               n_switch, n_wrap, n_seen, n_stop, n_restart, n_thr_change);
      check(n_switch > 0, "no frequency switch");
      check(n_wrap > 0, "index never wrapped");
      check(n_seen == NF, "not every frequency was measured");
      check(n_stop > 0, "ring never stopped");
      check(n_restart > 0, "ring never restarted");
      check(n_thr_change > 0, "threshold never changed");
      check(n_eq3 > 0, "no data edge checked against the select timing");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
