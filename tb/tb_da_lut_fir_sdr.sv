// End-to-end testbench of the SDR channel/equalizer system at its default
// size (64 taps, 8 samples per clock, reference delay 32).
//
// A BPSK source (+/-8192) is sent through a three-tap channel loaded into
// the channel filter's coefficient chain, a limiter and small noise. The
// equalizer trains against the delayed source. An independent model
// recomputes every stage: channel convolution, scaling, limiter and noise,
// the equalizer output from the coefficients it reports, the error, and the
// decimated stream; all are compared exactly, with the pipeline latency.
// The run reloads the channel mid-way, switches the limiter on, changes the
// step size and steps the decimation factor through 1, 2, 3 and 8; each of
// these mechanisms is counted and must occur. After training, the bit
// decisions sign(O(n)) must match the source (bit error rate check).
module tb_da_lut_fir_sdr;
  import da_fir_pkg::*;
  localparam int NBLK  = 1500;              // source blocks
  localparam int DLY   = TAPS / 2;          // reference delay of the top
  localparam int MW    = 4, CW = 4;

  logic clk = 0, rst_n = 0;
  logic coef_load = 0, s_valid = 0, adapt_en = 0, out_valid, eq_valid;
  logic signed [COEF_W-1:0] coef_in = '0;
  logic signed [DATA_W-1:0] s_in [BLOCK], noise_in [BLOCK];
  logic        [DATA_W-2:0] clip_level;
  logic        [3:0]        mu_shift;
  logic        [MW-1:0]     dec_factor;
  logic        [CW-1:0]     out_count;
  logic signed [DATA_W-1:0] out_data [BLOCK], eq_out [BLOCK];
  logic signed [DATA_W:0]   eq_err [BLOCK];
  logic signed [COEF_W-1:0] eq_coef [TAPS];

  da_lut_fir_sdr dut (.*);

  always #5 clk = ~clk;

  int     src   [NBLK*BLOCK];               // source samples
  longint ych   [NBLK][BLOCK];              // channel filter sums
  int     rx    [NBLK*BLOCK];               // received samples
  int     o_exp [NBLK][BLOCK];
  int     chain [TAPS];                     // channel coefficient chain model
  int     load_q [$];                       // coefficients still to load
  int     kept [$];
  int     phase = 0, m_prev = 1;
  int checks = 0, failures = 0;
  int n_reload = 0, n_clip = 0, n_adapt = 0, n_mu_change = 0, n_dec_change = 0;
  int n_kept_m [9];
  int bits = 0, bit_err = 0;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic queue_channel(int h0, int h1, int h2);
    // enter h[TAPS-1] first, h[0] last
    for (int k = TAPS - 1; k >= 0; k--)
      load_q.push_back(k == 0 ? h0 : k == 1 ? h1 : k == 2 ? h2 : 0);
    n_reload++;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) chain[k] = 0;
    for (int i = 0; i < BLOCK; i++) begin s_in[i] = '0; noise_in[i] = '0; end
    for (int n = 0; n < NBLK*BLOCK; n++) src[n] = ($urandom % 2) ? 8192 : -8192;
    clip_level = '1; mu_shift = 4'd1; dec_factor = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    queue_channel(32440, 13107, -4915);     // 0.99, 0.40, -0.15
    // load the channel before the source starts
    while (load_q.size() > 0) begin
      coef_load = 1; coef_in = COEF_W'(load_q.pop_front());
      @(negedge clk);
      for (int k = TAPS - 1; k > 0; k--) chain[k] = chain[k-1];
      chain[0] = int'(coef_in);
    end
    coef_load = 0;
    @(negedge clk);
    for (int t = 0; t < NBLK + 7; t++) begin
      // ---- a) observe what the last clock edge produced
      if (eq_valid) begin
        int b;
        b = t - 5;
        checks++;
        if (b < 0) begin failures++; $display("FAIL early equalizer output"); end
        else for (int i = 0; i < BLOCK; i++) begin
          int n, d, e;
          n = b*BLOCK + i;
          d = (n >= DLY) ? src[n-DLY] : 0;
          e = d - o_exp[b][i];
          checks += 2;
          if (int'(eq_out[i]) != o_exp[b][i]) begin
            failures++; if (failures < 6) $display("FAIL blk %0d O[%0d]=%0d want %0d", b, i, eq_out[i], o_exp[b][i]);
          end
          if (int'(eq_err[i]) != e) begin
            failures++; if (failures < 6) $display("FAIL blk %0d e[%0d]=%0d want %0d", b, i, eq_err[i], e);
          end
          if (b >= NBLK - 400 && d != 0) begin
            bits++;
            if ((o_exp[b][i] < 0) != (d < 0)) bit_err++;
          end
        end
      end else if (t >= 5 && t - 5 < NBLK) begin
        failures++; $display("FAIL missing equalizer output for block %0d", t - 5);
      end
      checks++;
      if (out_valid != (out_count != 0)) failures++;
      for (int i = 0; i < int'(out_count); i++) begin
        checks++;
        if (kept.size() == 0) begin failures++; break; end
        if (int'(out_data[i]) != kept[0]) begin
          failures++; if (failures < 6) $display("FAIL decimated sample %0d want %0d", out_data[i], kept[0]);
        end
        void'(kept.pop_front());
      end

      // ---- b) drive this clock
      s_valid = (t < NBLK);
      for (int i = 0; i < BLOCK; i++) s_in[i] = (t < NBLK) ? DATA_W'(src[t*BLOCK+i]) : '0;
      for (int i = 0; i < BLOCK; i++) noise_in[i] = DATA_W'(signed'(7'($urandom)));
      if (t == 600) queue_channel(31130, -9830, 6554);   // 0.95, -0.30, 0.20
      coef_load = (load_q.size() > 0);
      if (coef_load) coef_in = COEF_W'(load_q.pop_front());
      clip_level = (t >= 200 && t < 300) ? 15'd10000 : 15'h7fff;
      adapt_en = 1'b1;
      if (t == 250 || t == 600 || t == 700) n_mu_change++;
      mu_shift = (t < 250) ? 4'd1 : (t < 600) ? 4'd4 : (t < 700) ? 4'd1 : 4'd4;
      dec_factor = (t < 100) ? MW'(1) : (t < 200) ? MW'(2) : (t < 300) ? MW'(3) : (t < 400) ? MW'(8) : MW'(1);

      // ---- c) model this clock
      if (t < NBLK) begin
        for (int p = 0; p < BLOCK; p++) begin
          longint y;
          y = 0;
          for (int k = 0; k < TAPS; k++) begin
            int n;
            n = t*BLOCK + p - k;
            if (n >= 0) y += longint'(chain[k]) * longint'(src[n]);
          end
          ych[t][p] = y;
        end
      end
      if (coef_load) begin
        for (int k = TAPS - 1; k > 0; k--) chain[k] = chain[k-1];
        chain[0] = int'(coef_in);
      end
      if (t >= 2 && t - 2 < NBLK) begin      // limiter and noise, block t-2
        for (int i = 0; i < BLOCK; i++) begin
          int v, c;
          v = sat16(ych[t-2][i] >>> FRAC_W);
          c = int'(clip_level);
          if (v > c)  begin v = c;  n_clip++; end
          if (v < -c) begin v = -c; n_clip++; end
          rx[(t-2)*BLOCK+i] = sat16(v + int'(noise_in[i]));
        end
      end
      if (t >= 3 && t - 3 < NBLK) begin      // equalizer, block t-3
        for (int p = 0; p < BLOCK; p++) begin
          longint y;
          y = 0;
          for (int k = 0; k < TAPS; k++) begin
            int n;
            n = (t-3)*BLOCK + p - k;
            if (n >= 0) y += longint'(eq_coef[k]) * longint'(rx[n]);
          end
          o_exp[t-3][p] = sat16(y >>> FRAC_W);
        end
      end
      if (eq_valid) begin                    // weight step and decimator input
        int m;
        if (adapt_en) n_adapt++;
        m = (dec_factor == 0) ? 1 : int'(dec_factor);
        if (m != m_prev) begin phase = 0; n_dec_change++; end
        m_prev = m;
        for (int i = 0; i < BLOCK; i++) begin
          if (phase == 0) begin kept.push_back(o_exp[t-5][i]); n_kept_m[m]++; end
          phase = (phase == m - 1) ? 0 : phase + 1;
        end
      end
      @(negedge clk);
    end
    coef_load = 0;
    s_valid = 0;
    @(negedge clk);
    checks++;
    if (kept.size() != 0) begin failures++; $display("FAIL %0d decimated samples not output", kept.size()); end
    $display("mechanisms: reloads %0d, limiter hits %0d, weight steps %0d, step-size changes %0d, decimation changes %0d",
             n_reload, n_clip, n_adapt, n_mu_change, n_dec_change);
    $display("decimated samples kept with M=1: %0d M=2: %0d M=3: %0d M=8: %0d",
             n_kept_m[1], n_kept_m[2], n_kept_m[3], n_kept_m[8]);
    $display("bit errors after training: %0d of %0d", bit_err, bits);
    checks += 6;
    if (n_reload < 2 || n_clip == 0 || n_adapt == 0 || n_mu_change == 0 || n_dec_change < 3) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    if (n_kept_m[1] == 0 || n_kept_m[2] == 0 || n_kept_m[3] == 0 || n_kept_m[8] == 0) begin
      failures++; $display("FAIL a decimation factor was never used");
    end
    if (bits == 0 || bit_err * 100 > bits) begin failures++; $display("FAIL bit error rate above 1%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
