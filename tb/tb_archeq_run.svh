// tb_archeq_run.svh: body of the system tests, included inside a test
// module that declares NFR (frames), MAX_INTERVAL (largest allowed cycles
// between frame starts), PE1 and PE2 (PEs of XVAU-1/2), clocks the design
// with clk, instantiates it as dut and holds the watchdog.
//
// Random weights (2-bit, ternary in the first layer) and thresholds (placed at
// the quartiles of each channel's accumulators over the test frames, so that
// all activation levels occur) are loaded over the configuration bus, then NFR
// random occupancy grids are streamed in back to back. Each predicted beam
// index and score is compared with the reference model, the frame interval is
// checked against MAX_INTERVAL, the latency is reported, and each mechanism is
// counted and must occur: SAC and CAA accumulations, zero-padded window taps,
// pooling windows, flatten-buffer reuse, FIFO-full stalls, input stalls,
// result back-pressure and frames overlapping in the pipeline.

  int checks = 0, failures = 0, cyc = 0, nres = 0;
  arr_t w1, w2, w3, wf1, wf2, t1, t2, t3, tf1, tf2, grid [NFR];
  int exp_idx [NFR], exp_score [NFR];
  int t_first_in [NFR], t_res [NFR];
  int nin = 0;
  // mechanism counters
  int n_sac = 0, n_caa = 0, n_pad = 0, n_pool = 0, n_reuse = 0, n_fifo_full = 0;
  int n_in_stall = 0, n_backpressure = 0, n_overlap = 0;
  int act_hist [4];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.u_xvau1.u_conv.u_vatu.res_valid) n_sac++;
      if (dut.u_xvau2.u_conv.u_vatu.res_valid || dut.u_xvau3.u_conv.u_vatu.res_valid ||
          dut.u_fc1.u_vatu.res_valid || dut.u_fc2.u_vatu.res_valid) n_caa++;
      if (dut.u_xvau1.u_conv.issue && dut.u_xvau1.u_conv.pad) n_pad++;
      if (dut.u_xvau1.out_valid && dut.u_xvau1.out_ready) n_pool++;
      // a group after the first reads the stored vector again
      if (dut.u_fc1.issue && dut.u_fc1.g != '0) n_reuse++;
      if (!dut.u_fifo1.in_ready || !dut.u_fifo2.in_ready || !dut.u_fifo3.in_ready || !dut.u_fifo4.in_ready) n_fifo_full++;
      if (in_valid && !in_ready) n_in_stall++;
      if (beam_valid && !beam_ready) n_backpressure++;
      if (dut.u_xvau2.out_valid && dut.u_xvau2.out_ready)
        for (int c = 0; c < 16; c++) act_hist[dut.u_xvau2.out_data[c*2 +: 2]]++;
      if (in_valid && in_ready) begin
        if (nin % 400 == 0) begin
          t_first_in[nin/400] = cyc;
          if (nin/400 > nres) n_overlap++;   // a frame enters before the previous result left
        end
        nin++;
      end
      if (beam_valid && beam_ready) begin
        checks++;
        t_res[nres] = cyc;
        if (int'(beam_idx) != exp_idx[nres] || int'(beam_score) != exp_score[nres]) begin
          failures++;
          $display("frame %0d: beam %0d score %0d, expected beam %0d score %0d",
                   nres, beam_idx, beam_score, exp_idx[nres], exp_score[nres]);
        end else
          $display("frame %0d: beam %0d score %0d ok, latency %0d cycles", nres, beam_idx, beam_score, cyc - t_first_in[nres]);
        nres++;
      end
    end
  end

  // thresholds of a conv layer from its accumulators over all test frames
  function automatic arr_t calib_conv(const ref arr_t fm [NFR], input int HW, CIN, COUT, const ref arr_t w);
    arr_t raw, r, dummy;
    raw = new [NFR*HW*HW*COUT];
    dummy = new [COUT*3];
    for (int f = 0; f < NFR; f++) begin
      r = conv(fm[f], HW, HW, CIN, COUT, 3, w, dummy, 1);
      foreach (r[i]) raw[f*HW*HW*COUT + i] = r[i];
    end
    return quantile_th(raw, COUT);
  endfunction

  task automatic wr(input logic [2:0] layer, input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = layer; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
  endtask

  initial begin
    arr_t a1, a2, a3, v1, s2, l1 [NFR], l2 [NFR], l3 [NFR];
    rst_n = 0; cfg = '0; in_valid = 0; in_bit = 0; beam_ready = 1;
    // ---- random network; thresholds set from the accumulators of the
    //      test frames so that every activation level occurs ----
    w1  = rand_w(16*1*9, 1);
    w2  = rand_w(16*16*9, 0);
    w3  = rand_w(32*16*9, 0);
    wf1 = rand_w(64*128, 0);
    wf2 = rand_w(64*64, 0);
    tf2 = rand_th(64, 0, 1);   // unused: the last layer has no thresholds
    for (int f = 0; f < NFR; f++) begin
      grid[f] = new [400];
      foreach (grid[f][i]) grid[f][i] = ($urandom_range(0, 99) < 30) ? 1 : 0;
    end
    t1 = calib_conv(grid, 20, 1, 16, w1);
    for (int f = 0; f < NFR; f++) begin a1 = conv(grid[f], 20, 20, 1, 16, 3, w1, t1); l1[f] = pool(a1, 20, 20, 16, 2); end
    t2 = calib_conv(l1, 10, 16, 16, w2);
    for (int f = 0; f < NFR; f++) begin a2 = conv(l1[f], 10, 10, 16, 16, 3, w2, t2); l2[f] = pool(a2, 10, 10, 16, 2); end
    t3 = calib_conv(l2, 5, 16, 32, w3);
    for (int f = 0; f < NFR; f++) begin a3 = conv(l2[f], 5, 5, 16, 32, 3, w3, t3); l3[f] = pool(a3, 5, 5, 32, 2); end
    begin
      arr_t raw;
      raw = new [NFR*64];
      for (int f = 0; f < NFR; f++) begin
        v1 = fc(l3[f], 128, 64, wf1, tf2, 0);
        foreach (v1[j]) raw[f*64+j] = v1[j];
      end
      tf1 = quantile_th(raw, 64);
    end
    for (int f = 0; f < NFR; f++) begin
      v1 = fc(l3[f], 128, 64, wf1, tf1, 1);
      s2 = fc(v1, 64, 64, wf2, tf2, 0);
      exp_idx[f] = 0; exp_score[f] = s2[0];
      for (int j = 1; j < 64; j++) if (s2[j] > exp_score[f]) begin exp_score[f] = s2[j]; exp_idx[f] = j; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- load weights and thresholds ----
    for (int a = 0; a < (16/PE1)*9*1; a++) wr(LID_XVAU1, 0, a, conv_word(w1, 1, PE1, 1, 3, a));
    for (int a = 0; a < (16/PE2)*9*4; a++) wr(LID_XVAU2, 0, a, conv_word(w2, 16, PE2, 4, 3, a));
    for (int a = 0; a < 16*9*2; a++) wr(LID_XVAU3, 0, a, conv_word(w3, 16, 2, 8, 3, a));
    for (int a = 0; a < 2*128; a++)  wr(LID_FC1, 0, a, fc_word(wf1, 128, 32, 1, a));
    for (int a = 0; a < 4*64; a++)   wr(LID_FC2, 0, a, fc_word(wf2, 64, 16, 1, a));
    for (int c = 0; c < 16; c++) wr(LID_XVAU1, 1, c, th_word(t1, c));
    for (int c = 0; c < 16; c++) wr(LID_XVAU2, 1, c, th_word(t2, c));
    for (int c = 0; c < 32; c++) wr(LID_XVAU3, 1, c, th_word(t3, c));
    for (int c = 0; c < 64; c++) wr(LID_FC1, 1, c, th_word(tf1, c));
    @(negedge clk);
    cfg.we = 0;
    // ---- stream the grids; hold back results now and then ----
    fork
      for (int f = 0; f < NFR; f++)
        for (int px = 0; px < 400; px++) begin
          @(negedge clk);
          in_valid = 1;
          in_bit   = grid[f][px][0];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
      forever begin
        @(negedge clk);
        beam_ready = (nres == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
      end
    join_any
    wait (nres == NFR);
    repeat (10) @(negedge clk);
    // ---- throughput: frame issue interval in steady state ----
    for (int f = 1; f < NFR; f++) begin
      checks++;
      $display("frame %0d accepted %0d cycles after frame %0d", f, t_first_in[f] - t_first_in[f-1], f-1);
      if (t_first_in[f] - t_first_in[f-1] > MAX_INTERVAL) begin
        failures++; $display("frame interval above %0d cycles", MAX_INTERVAL);
      end
    end
    $display("mechanisms: sac %0d caa %0d pad_taps %0d pool_out %0d fc_reuse %0d fifo_full %0d in_stall %0d backpressure %0d overlap %0d",
             n_sac, n_caa, n_pad, n_pool, n_reuse, n_fifo_full, n_in_stall, n_backpressure, n_overlap);
    $display("XVAU-2 activation levels: %0d %0d %0d %0d", act_hist[0], act_hist[1], act_hist[2], act_hist[3]);
    foreach (act_hist[i]) begin checks++; if (act_hist[i] == 0) begin failures++; $display("activation level %0d never seen", i); end end
    checks++; if (n_sac == 0) begin failures++; $display("SAC never used"); end
    checks++; if (n_caa == 0) begin failures++; $display("CAA never used"); end
    checks++; if (n_pad == 0) begin failures++; $display("no padded tap"); end
    checks++; if (n_pool == 0) begin failures++; $display("no pooling"); end
    checks++; if (n_reuse == 0) begin failures++; $display("no buffer reuse"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("FIFO never full"); end
    checks++; if (n_in_stall == 0) begin failures++; $display("input never stalled"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    checks++; if (n_overlap == 0) begin failures++; $display("frames never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
