// Self-checking testbench of the adaptive DA-LUT channel equalizer.
//
// An independent model tracks the weights: for every block it predicts the
// output o = sat(conv(coefficients in force when the block entered) >>> 15),
// the error e = d - o and the sign-error block-LMS step, and compares
// outputs, errors, latency (two clocks) and all coefficients every clock.
// Phase 1 uses a random reference; phase 2 is a system-identification run
// (the reference is the input passed through a known short filter) and
// checks that adaptation drives the error down.
module tb_channel_equalizer;
  localparam int unsigned DATA_W = 16, COEF_W = 16, TAPS = 8, BLOCK = 4, GRP = 4, WFRAC = 8;
  localparam int unsigned WACC_W = COEF_W + WFRAC;
  logic clk = 0, rst_n = 0, in_valid = 0, adapt_en = 0, out_valid;
  logic [3:0] mu_shift;
  logic signed [DATA_W-1:0] r [BLOCK], d [BLOCK], o [BLOCK];
  logic signed [DATA_W:0]   e [BLOCK];
  logic signed [COEF_W-1:0] coef [TAPS];

  longint wm [TAPS];                   // model weights, WACC_W-bit values
  int     hist [$];                    // input stream, newest first
  int     exp_o [$], exp_win [$], exp_t [$];
  int checks = 0, failures = 0, cyc = 0, updates = 0;
  bit     pend = 0;
  int     pend_e [BLOCK];
  int     pend_w [TAPS + BLOCK - 1];
  longint err_early = 0, err_late = 0, ref_late = 0;

  channel_equalizer #(.DATA_W(DATA_W), .COEF_W(COEF_W), .FRAC_W(15), .TAPS(TAPS), .BLOCK(BLOCK),
                      .GRP(GRP), .WFRAC(WFRAC)) dut (
    .clk, .rst_n, .in_valid, .r, .d, .adapt_en, .mu_shift, .out_valid, .o, .e, .coef);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint coef_of(longint w);
    return w >>> WFRAC;
  endfunction

  // h_true for phase 2 (Q1.15) applied to the input with a delay of 1
  function automatic int ident_ref(int n_newest_off);
    longint s;
    s = 0;
    s += 16384 * longint'(hist[n_newest_off + 1]);
    s += -8192 * longint'(hist[n_newest_off + 2]);
    s += 4096  * longint'(hist[n_newest_off + 3]);
    return sat16(s >>> 15);
  endfunction

  initial begin
    int dq [$];                        // references waiting for their block
    for (int k = 0; k < TAPS; k++) wm[k] = 0;
    for (int i = 0; i < TAPS + BLOCK + 4; i++) hist.push_front(0);
    for (int i = 0; i < BLOCK; i++) begin r[i] = '0; d[i] = '0; end
    mu_shift = 4'd2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1600; t++) begin
      logic v;
      bit phase2;
      phase2 = (t >= 300);
      v = phase2 ? 1'b1 : (($urandom % 4) != 0);
      adapt_en = phase2 ? 1'b1 : 1'($urandom % 4 != 0);
      mu_shift = phase2 ? 4'd1 : 4'($urandom % 8);
      // the step of the block that left last clock is taken at the coming edge
      if (pend && adapt_en) take_step();
      pend = 0;
      if (t >= 1596) v = 0;
      in_valid = v;
      for (int i = 0; i < BLOCK; i++) r[i] = DATA_W'(signed'(13'($urandom)));
      // model of the block entering now, with the coefficients now in force
      if (v) begin
        for (int i = 0; i < BLOCK; i++) hist.push_front(int'(r[i]));
        for (int p = 0; p < BLOCK; p++) begin
          longint y;
          y = 0;
          for (int k = 0; k < TAPS; k++) y += longint'(coef[k]) * longint'(hist[BLOCK-1-p+k]);
          exp_o.push_back(sat16(y >>> 15));
          dq.push_back(phase2 ? ident_ref(BLOCK-1-p) : int'(signed'(14'($urandom))));
        end
        for (int j = 0; j < TAPS + BLOCK - 1; j++) exp_win.push_back(hist[j]);
        exp_t.push_back(cyc + 2);
      end
      @(negedge clk);
      // coefficients after the step taken at the last clock edge
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (longint'(coef[k]) != coef_of(wm[k])) begin
          failures++; if (failures < 6) $display("FAIL t=%0d coef[%0d]=%0d want %0d", t, k, coef[k], coef_of(wm[k]));
        end
      end
      if (out_valid) begin
        int ew [TAPS + BLOCK - 1];
        int ee [BLOCK];
        int tt;
        checks++;
        tt = exp_t.pop_front();
        if (tt != cyc) begin failures++; $display("FAIL latency %0d want %0d", cyc, tt); end
        for (int j = 0; j < TAPS + BLOCK - 1; j++) ew[j] = exp_win.pop_front();
        // reference of the block leaving now, held until the next half clock
        for (int i = 0; i < BLOCK; i++) d[i] = DATA_W'(dq[i]);
        #1;
        for (int p = 0; p < BLOCK; p++) begin
          int eo, ed;
          eo = exp_o.pop_front();
          ed = dq.pop_front();
          ee[p] = ed - eo;
          checks += 2;
          if (int'(o[p]) != eo) begin
            failures++; if (failures < 6) $display("FAIL t=%0d o[%0d]=%0d want %0d", t, p, o[p], eo);
          end
          if (int'(e[p]) != ee[p]) begin
            failures++; if (failures < 6) $display("FAIL t=%0d e[%0d]=%0d want %0d", t, p, e[p], ee[p]);
          end
          if (t >= 300 && t < 400) err_early += (ee[p] < 0) ? -ee[p] : ee[p];
          if (t >= 1500) begin
            err_late += (ee[p] < 0) ? -ee[p] : ee[p];
            ref_late += (ed < 0) ? -ed : ed;
          end
        end
        for (int p = 0; p < BLOCK; p++) pend_e[p] = ee[p];
        for (int j = 0; j < TAPS + BLOCK - 1; j++) pend_w[j] = ew[j];
        pend = 1;
      end
    end
    checks++;
    if (updates == 0) failures++;
    checks++;
    $display("identification: mean |e| early %0d, late %0d, mean |d| late %0d",
             err_early / 400, err_late / 384, ref_late / 384);
    if (!(err_late * 20 < ref_late)) begin failures++; $display("FAIL equalizer did not converge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take_step();
          updates++;
          for (int k = 0; k < TAPS; k++) begin
            longint g, nw;
            g = 0;
            for (int p = 0; p < BLOCK; p++) begin
              if (pend_e[p] > 0) g += pend_w[BLOCK-1-p+k];
              if (pend_e[p] < 0) g -= pend_w[BLOCK-1-p+k];
            end
            nw = wm[k] + (g >>> mu_shift);
            if (nw > (64'sd1 <<< (WACC_W - 1)) - 1) nw = (64'sd1 <<< (WACC_W - 1)) - 1;
            if (nw < -(64'sd1 <<< (WACC_W - 1)))    nw = -(64'sd1 <<< (WACC_W - 1));
            wm[k] = nw;
          end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
