// tb_mem_ctrl: the memory controller on its own, with behavioural stand-ins
// for everything around it.
//   - memory: one cycle read latency, returns x = address, y = ~address;
//   - vectoring CORDIC: a 16-deep pipeline whose "phase" is {x, y}, so every
//     phase delivered to a block carries the sample address it came from;
//   - rotation CORDIC: a 16-deep pipeline of valid and tag;
//   - timing recovery, coarse estimator, O-QPSK and MSK preamble detectors:
//     count their inputs and answer after a chosen number of them with a
//     chosen result (found, score, index, inversion).
// Per frame the testbench records, for every destination, the addresses it
// was fed and checks them against the controller's plan: the timing
// recovery samples base..base+(STR_CHIPS+1)*SPS-1, chip samples at
// base+tau+SPS*k for the estimator, the offset compensator and the residual
// compensator (which starts one training symbol before the payload), every
// sample for the differential detector with its strobe on the tau phase, the
// payload address, the chain used, the held estimate (theta_hat = arg/2 of
// the FFT peak, plus half a turn on an inverted match), cfo_run only when no
// estimate is held or one is requested, both automatic switches, lost frames
// in both chains and frame_done exactly once per frame.
module tb_mem_ctrl;
  import rx_pkg::*;
  localparam int AW = 16, SPS = 8, STR_CHIPS = 128, NQ = 128, SEARCH = 320, LAT = 16;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, manual_mode = 1, cfo_req = 0;
  logic [AW-1:0] frame_base = '0, frame_len = '0;
  chain_e manual_chain = CHAIN_MSK;
  logic busy, frame_done, frame_lost, mode_switch, cfo_run;
  chain_e chain_used, dsp_chain;
  logic [7:0] pd_score, thr_detect;
  logic [AW-1:0] payload_addr, rd_addr, search_chips;
  logic [2:0] frame_tau;
  sample_t rd_x, rd_y, cv_x, cv_y;
  logic cv_valid, rot_valid;
  logic [3:0] cv_tag;
  phase_t rot_angle, v_hat, theta_hat;
  logic [1:0] rot_tag;
  logic str_start, str_valid, cfo_start, cfo_valid, ioc_start, ioc_valid, rpnc_start, rpnc_valid;
  logic dpd_start, dpd_valid, dpd_strobe, mpd_start, mpd_run, dsp_start;

  // stand-in outputs
  logic str_done = 0, cfo_done = 0, ioc_done = 0, ioc_found = 0, ioc_inv = 0;
  logic mpd_done = 0, mpd_found = 0;
  logic [2:0] str_tau = '0;
  phase_t cfo_v_hat = '0;
  logic signed [15:0] cfo_peak_x = 16'sh1234, cfo_peak_y = 16'sh0800;
  logic [7:0] ioc_score = '0, mpd_score = '0;
  logic [AW-1:0] ioc_idx = '0, mpd_idx = '0;
  logic dpd_rot_valid = 0;
  phase_t dpd_rot_angle = '0;
  logic [1:0] dpd_rot_tag = '0;

  // CORDIC models
  logic   cv_pv [LAT];
  phase_t cv_pp [LAT];
  logic [3:0] cv_pt [LAT];
  logic   rot_pv [LAT];
  logic [1:0] rot_pt [LAT];
  logic cv_out_valid, rot_out_valid;
  phase_t cv_out_phase;
  logic [3:0] cv_out_tag;
  logic [1:0] rot_out_tag;
  assign cv_out_valid  = cv_pv[LAT-1];
  assign cv_out_phase  = cv_pp[LAT-1];
  assign cv_out_tag    = cv_pt[LAT-1];
  assign rot_out_valid = rot_pv[LAT-1];
  assign rot_out_tag   = rot_pt[LAT-1];

  mem_ctrl #(.ADDR_W(AW), .SPS(SPS), .STR_CHIPS(STR_CHIPS), .NQ(NQ), .SEARCH_CHIPS(SEARCH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    rd_x <= sample_t'(rd_addr);
    rd_y <= sample_t'(~rd_addr);
    cv_pv[0] <= cv_valid; cv_pp[0] <= {cv_x, cv_y}; cv_pt[0] <= cv_tag;
    rot_pv[0] <= rot_valid; rot_pt[0] <= rot_tag;
    for (int i = 1; i < LAT; i++) begin
      cv_pv[i] <= cv_pv[i-1]; cv_pp[i] <= cv_pp[i-1]; cv_pt[i] <= cv_pt[i-1];
      rot_pv[i] <= rot_pv[i-1]; rot_pt[i] <= rot_pt[i-1];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in answers and address logs
  int a_str[$], a_cfo, a_ioc[$], a_rpnc[$], a_dpd[$], s_dpd[$], a_dat[$], a_mpd;
  logic f_lost;
  int n_done, n_cfo_run, n_sw_oqpsk, n_sw_msk;
  int str_n, ioc_after, mpd_after;   // answer after this many inputs (0: never)
  logic [2:0] t_tau;
  logic t_ioc_found, t_ioc_inv, t_mpd_found;
  logic [7:0] t_ioc_score, t_mpd_score;
  logic [AW-1:0] t_ioc_idx, t_mpd_idx;

  always @(posedge clk) begin
    str_done <= 0; cfo_done <= 0; ioc_done <= 0; mpd_done <= 0;
    if (rst_n) begin
      if (frame_done) n_done++;
      if (cfo_run) n_cfo_run++;
      if (mode_switch && dut.cur_chain == CHAIN_OQPSK) n_sw_oqpsk++;
      if (mode_switch && dut.cur_chain == CHAIN_MSK) n_sw_msk++;
      if (str_valid) begin
        a_str.push_back(int'(cv_out_phase[31:16]));
        if (a_str.size() == str_n) begin str_done <= 1; str_tau <= t_tau; end
      end
      if (cfo_valid) begin
        a_cfo++;
        if (a_cfo == NQ) begin cfo_done <= 1; cfo_v_hat <= 32'h0A3D70A4; end
      end
      if (ioc_valid) begin
        a_ioc.push_back(int'(cv_out_phase[31:16]));
        if (a_ioc.size() == ioc_after) begin
          ioc_done <= 1; ioc_found <= t_ioc_found; ioc_score <= t_ioc_score;
          ioc_idx <= t_ioc_idx; ioc_inv <= t_ioc_inv;
        end
      end
      if (rpnc_valid) a_rpnc.push_back(int'(cv_out_phase[31:16]));
      if (dpd_valid) begin
        a_dpd.push_back(int'(cv_out_phase[31:16]));
        s_dpd.push_back(int'(dpd_strobe));
        if (!mpd_run) a_dat.push_back(int'(cv_out_phase[31:16]));
        if (mpd_run) begin
          a_mpd++;
          if (a_mpd == mpd_after) begin
            mpd_done <= 1; mpd_found <= t_mpd_found; mpd_score <= t_mpd_score; mpd_idx <= t_mpd_idx;
          end
        end
      end
    end
  end

  // check a run of addresses: n entries from a0 with stride st
  task automatic run_ok(string what, int q[$], int first, int n, int a0, int st);
    bit ok;
    ok = (q.size() >= first + n);
    for (int k = 0; ok && k < n; k++) if (q[first + k] != ((a0 + st * k) & 16'hFFFF)) ok = 0;
    check($sformatf("%s: %0d addresses from %0d step %0d (got %0d)", what, n, a0, st, q.size() - first), ok);
  endtask

  // one frame: base, length in chips, mode, cfo_req, tau the timing recovery
  // reports, then the MSK and O-QPSK detector answers (after, found, score,
  // index[, inverted]); after = 0 means the detector never answers
  task automatic frame(string tag, int base, int chips, bit manual, chain_e mch, bit req, int tau,
                       int mafter, bit mfound, int mscore, int midx,
                       int iafter, bit ifound, int iscore, int iidx, bit iinv);
    int len, fchips, nd0;
    len = chips * SPS + SPS;
    fchips = (len - tau) / SPS;
    a_str = {}; a_cfo = 0; a_ioc = {}; a_rpnc = {}; a_dpd = {}; s_dpd = {}; a_dat = {}; a_mpd = 0;
    str_n = (STR_CHIPS + 1) * SPS; t_tau = 3'(tau);
    mpd_after = mafter; t_mpd_found = mfound; t_mpd_score = 8'(mscore); t_mpd_idx = AW'(midx);
    ioc_after = iafter; t_ioc_found = ifound; t_ioc_score = 8'(iscore); t_ioc_idx = AW'(iidx); t_ioc_inv = iinv;
    nd0 = n_done;
    @(negedge clk) begin
      frame_start = 1; frame_base = AW'(base); frame_len = AW'(len);
      manual_mode = manual; manual_chain = mch; cfo_req = req;
    end
    @(negedge clk) begin frame_start = 0; cfo_req = 0; end
    check($sformatf("%s busy", tag), busy);
    while (!frame_done) @(negedge clk);
    f_lost = frame_lost;
    repeat (3) @(negedge clk);
    check($sformatf("%s: one frame_done", tag), n_done == nd0 + 1);
    check($sformatf("%s: tau %0d", tag, frame_tau), frame_tau == 3'(tau));
    check($sformatf("%s: idle", tag), !busy);
    run_ok({tag, " timing recovery"}, a_str, 0, str_n, base, 1);
    // frame_chips for the stream lengths
    if (a_cfo != 0) check($sformatf("%s: %0d estimator samples", tag, a_cfo), a_cfo == NQ);
    if (iafter != 0 || a_ioc.size() != 0)
      run_ok({tag, " offset compensation"}, a_ioc, 0, (iafter != 0) ? iafter : SEARCH, base + tau, SPS);
    if (a_rpnc.size() != 0)
      run_ok({tag, " residual compensation"}, a_rpnc, 0, fchips - iidx - 1 + 32,
             base + tau + SPS * (iidx + 1 - 32), SPS);
    if (a_mpd != 0) begin
      run_ok({tag, " MSK preamble"}, a_dpd, 0, mafter, base, 1);
      for (int k = 0; k < a_dpd.size(); k++)
        if (s_dpd[k] != (((a_dpd[k] - base) % SPS) == tau)) begin
          check($sformatf("%s: strobe at %0d", tag, a_dpd[k]), 0);
          break;
        end
    end
  endtask

  logic [AW-1:0] exp_pay;
  int sw0, sw1, c0;
  initial begin
    n_done = 0; n_cfo_run = 0; n_sw_oqpsk = 0; n_sw_msk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check("reset: idle in MSK", !busy && dut.cur_chain == CHAIN_MSK && !frame_done);

    // 1. manual O-QPSK, no estimate held: coarse estimate, then compensation
    frame("f1", 1000, 700, 1, CHAIN_OQPSK, 0, 3, 0, 0, 0, 0, 150, 1, 120, 127, 0);
    check("f1: estimate taken", n_cfo_run == 1);
    check("f1: chain", chain_used == CHAIN_OQPSK && !f_lost);
    check("f1: payload", payload_addr == AW'(1000 + 3 + SPS * 128));
    check("f1: v_hat", v_hat == 32'h0A3D70A4);
    check("f1: theta_hat", theta_hat == ({16'h1234, 16'h0800} >> 1));
    check("f1: residual compensator samples", a_rpnc.size() == (700 * SPS + SPS - 3) / SPS - 128 + 32);
    check("f1: no switch in manual", n_sw_oqpsk == 0 && n_sw_msk == 0);

    // 2. manual O-QPSK, estimate held, inverted match: no new estimate
    frame("f2", 9000, 500, 1, CHAIN_OQPSK, 0, 6, 0, 0, 0, 0, 200, 1, 90, 160, 1);
    check("f2: estimate reused", n_cfo_run == 1 && a_cfo == 0);
    check("f2: theta_hat + half turn", theta_hat == (({16'h1234, 16'h0800} >> 1) + 32'h80000000));
    check("f2: payload", payload_addr == AW'(9000 + 6 + SPS * 161));

    // 3. requested estimate
    frame("f3", 200, 500, 1, CHAIN_OQPSK, 1, 0, 0, 0, 0, 0, 140, 1, 100, 127, 0);
    check("f3: estimate requested and taken", n_cfo_run == 2 && a_cfo == NQ);
    check("f3: theta_hat back", theta_hat == ({16'h1234, 16'h0800} >> 1));

    // 4. manual O-QPSK, no peak within the search: lost
    frame("f4", 3000, 500, 1, CHAIN_OQPSK, 0, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    check("f4: lost", f_lost);
    check("f4: whole search read", a_ioc.size() == SEARCH);
    check("f4: no compensation", a_rpnc.size() == 0);

    // 5. manual MSK: the differential chain; payload two chips after the peak bit
    frame("f5", 20000, 600, 1, CHAIN_MSK, 0, 5, 300, 1, 125, 126, 0, 0, 0, 0, 0);
    exp_pay = AW'(20000 + 5 + SPS * 128);
    check("f5: chain MSK", chain_used == CHAIN_MSK && !f_lost);
    check("f5: payload", payload_addr == exp_pay);
    run_ok("f5: MSK data, from one chip before the payload", a_dat, 0,
           ((600 * SPS + SPS - 5) / SPS - 128) * SPS + SPS, int'(exp_pay) - SPS, 1);
    check("f5: nothing after the data", a_dat.size() == ((600 * SPS + SPS - 5) / SPS - 128) * SPS + SPS);

    // 6. manual MSK without a peak: lost
    frame("f6", 20000, 600, 1, CHAIN_MSK, 0, 5, 100, 0, 60, 0, 0, 0, 0, 0, 0);
    check("f6: lost", f_lost && a_dat.size() == 0);

    // 7. automatic, poor MSK preamble (score 100): same frame goes coherent;
    //    its good coherent score (115) sends the next frame back to MSK
    sw0 = n_sw_oqpsk; sw1 = n_sw_msk; c0 = n_cfo_run;
    frame("f7", 30000, 600, 0, CHAIN_MSK, 0, 1, 300, 1, 100, 126, 180, 1, 115, 127, 0);
    check("f7: switched to O-QPSK", n_sw_oqpsk == sw0 + 1 && chain_used == CHAIN_OQPSK && !f_lost);
    check("f7: switched back for the next frame", n_sw_msk == sw1 + 1 && dut.cur_chain == CHAIN_MSK);
    check("f7: estimate held, not retaken", n_cfo_run == c0);
    check("f7: score", pd_score == 8'd115);

    // 8. automatic, good MSK preamble: stays MSK
    frame("f8", 30000, 600, 0, CHAIN_MSK, 0, 1, 300, 1, 118, 126, 0, 0, 0, 0, 0);
    check("f8: MSK", chain_used == CHAIN_MSK && dut.cur_chain == CHAIN_MSK && !f_lost);

    // 9. automatic, poor MSK and a coherent score under 110: stays O-QPSK
    sw1 = n_sw_msk;
    frame("f9", 30000, 600, 0, CHAIN_MSK, 0, 1, 300, 0, 70, 0, 180, 1, 95, 127, 0);
    check("f9: O-QPSK, stays", chain_used == CHAIN_OQPSK && dut.cur_chain == CHAIN_OQPSK && n_sw_msk == sw1);
    // 10. automatic, starts O-QPSK now: no MSK attempt
    frame("f10", 30000, 600, 0, CHAIN_MSK, 0, 1, 0, 0, 0, 0, 180, 1, 112, 127, 0);
    check("f10: O-QPSK without MSK attempt", a_mpd == 0 && chain_used == CHAIN_OQPSK);
    check("f10: back to MSK", dut.cur_chain == CHAIN_MSK);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
