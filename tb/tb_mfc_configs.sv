`timescale 1ps/1ps
// tb_mfc_configs: runs the MFC circuit in the three smaller configurations
// that the measurements compare with the main one: 2, 4 and 6 CARRY4
// blocks, i.e. 8, 16 and 24 clock frequencies (the 32-frequency default is
// covered by tb_mfc). The three rings run side by side, each closed by its
// own bufg_model, with a switching threshold of 2 cycles.
//
// For each configuration every clock period is compared with Eq. (1),
// CCT_i = 31840 ps + i * 100 ps, all n frequencies must be measured, the
// index must wrap after n-1, and the average cycle over whole sweeps must be
// BCCT + (n-1) * 50 ps. The resulting performance overhead
// (average - BCCT) / BCCT is printed for each n.
module tb_mfc_configs;
  import mfc_pkg::*;

  localparam int unsigned NCFG = 3;
  localparam int unsigned THR  = 2;
  localparam int unsigned STEP = 2 * D_MUXCY_PS_DEF;

  logic en, rst_n;
  int   checks [NCFG];
  int   failures [NCFG];
  bit   done [NCFG];

  initial begin : watchdog
    #100_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned NC = 2 * (g + 1);      // 2, 4, 6 CARRY4 blocks
    localparam int unsigned NF = 4 * NC;           // 8, 16, 24 frequencies
    localparam int unsigned SW = $clog2(NF);
    localparam int unsigned SWEEP2 = 2 * BCCT_PS + (NF - 1) * STEP;

    logic          data_in, clk, cout;
    logic [SW-1:0] freq_sel;
    logic [NF-1:0] sin;

    mfc #(.N_CARRY4(NC)) dut (
      .en, .rst_n, .sw_threshold(9'(THR)), .data_in, .clk, .cout,
      .freq_sel, .sin);
    bufg_model #(.T_BUFG_PS(T_BUFG_PS_DEF)) u_bufg (.i(clk), .o(data_in));

    int unsigned ref_idx = 0, ref_held = 0, prev_idx = 0;
    int          edges = 0, wraps = 0;
    realtime     last_edge;
    bit          seen [NF];
    longint      sum_ps = 0;
    int          n_sum = 0;

    task automatic check(input bit cond, input string msg);
      checks[g]++;
      if (!cond) begin
        failures[g]++;
        $display("FAIL (n=%0d): %s", NF, msg);
      end
    endtask

    always @(posedge cout) if (en && rst_n) begin
      realtime now;
      now = $realtime;
      edges++;
      if (edges > 1) begin
        check(now - last_edge == BCCT_PS + prev_idx * STEP,
              $sformatf("period at index %0d is %0t ps", prev_idx, now - last_edge));
        seen[prev_idx] = 1;
        // average over whole sweeps: periods 2 .. 1 + 3*NF*THR
        if (edges >= 2 && edges < 2 + 3 * NF * THR) begin
          sum_ps += longint'(now - last_edge);
          n_sum++;
        end
      end
      ref_held++;
      if (ref_held >= THR) begin
        ref_held = 0;
        if (ref_idx == NF - 1) wraps++;
        ref_idx = (ref_idx + 1) % NF;
      end
      #1;
      check(int'(freq_sel) == ref_idx, $sformatf("freq_sel=%0d ref=%0d", freq_sel, ref_idx));
      check(sin == NF'({NF{1'b1}} >> ref_idx), $sformatf("sin=%h", sin));
      prev_idx  = ref_idx;
      last_edge = now;
      if (edges == 3 * NF * THR + 4) done[g] = 1;
    end

    task automatic finish_cfg();
      int n_seen = 0;
      real avg, ovh;
      foreach (seen[k]) n_seen += seen[k];
      check(n_seen == NF, $sformatf("%0d of %0d frequencies measured", n_seen, NF));
      check(wraps > 0, "index never wrapped");
      // first measured period starts after edge 1 (index 0, held once
      // already), so the window of 3*NF*THR periods is whole sweeps shifted
      // by one period: each index still appears 3*THR times.
      check(n_sum == 3 * NF * THR, $sformatf("averaged %0d periods", n_sum));
      check(sum_ps * 2 == longint'(n_sum) * longint'(SWEEP2),
            $sformatf("average %0d/%0d", sum_ps, n_sum));
      avg = real'(sum_ps) / n_sum;
      ovh = (avg - BCCT_PS) / BCCT_PS;
      $display("n=%0d frequencies (%0d CARRY4): average cycle %0.1f ps, overhead %0.4f",
               NF, NC, avg, ovh);
    endtask
  end

  initial begin
    en = 0; rst_n = 1;
    #100 rst_n = 0;
    #100_000 rst_n = 1;    // ring has settled from its random start
    #10_000 en = 1;
    wait (done[0] && done[1] && done[2]);
    g_cfg[0].finish_cfg();
    g_cfg[1].finish_cfg();
    g_cfg[2].finish_cfg();
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
