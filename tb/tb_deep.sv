// tb_deep: test of the EEG/ECoG processor on its own, at its default sizes.
//
// The testbench plays the acquisition side: every 12 clocks it presents one
// 9-bit code, channels 0..15 in turn with the channel-one indicator on
// channel 0 (a per-channel sinusoid
// plus noise).  It programs random FIR taps, spatial weights, correlation
// partners, band, radius and reduction weights, and a RISC program that
// outputs all 80 features, the 4 reduced values and a decision (channel-1
// energy above a threshold, the way a seizure detector would use it).
// An independent model of the filters and of every feature is kept; at each
// iteration start it freezes the expected results and compares them with the
// 85 words the RISC outputs.  The band-energy ratio is checked against a
// floating-point DFT within a tolerance; everything else must match exactly.
// It also checks the 10 iterations per second rate, that each result set is
// complete before the next iteration (0.1 s response) and the gain output,
// and finally loads a slow program to provoke an iteration overrun.
module tb_deep;
  import risc_pkg::*;
  localparam int NCH = 16, TAPS = 32, WIN = 32, NF = 80, NR = 4, DIV = 12;
  localparam int THRESH = 120;

  logic clk = 0, rst_n = 0;
  logic [8:0] adc_data;
  logic adc_start, prog_we = 0, out_valid, iter_start, overrun, smp_valid, smp_ch_one;
  logic [3:0] ch_sel, pga_gain;
  logic [15:0] prog_addr = 0, prog_data = 0, out_data;
  int slot = 0;

  deep dut (.clk, .rst_n, .smp_valid, .smp_ch_one, .smp_data(adc_data), .prog_we, .prog_addr,
            .prog_data, .gain(pga_gain), .out_valid, .out_data, .iter_start, .overrun);
  always #5 clk = ~clk;

  // sample slots: 12 clocks, conversion start first, sample ready last
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin slot <= 0; ch_sel <= 0; end
    else if (slot == DIV - 1) begin slot <= 0; ch_sel <= ch_sel + 1'b1; end
    else slot <= slot + 1;
  assign adc_start  = (slot == 0);
  assign smp_valid  = (slot == DIV - 1);
  assign smp_ch_one = smp_valid && (ch_sel == 0);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- configuration and its model ----------------
  int a [TAPS];
  int w [NCH][NCH];
  int partner [NCH];
  int pw [NR][NF];
  localparam int FS = 3, SS = 2, ES = 10, VS = 9, XS = 11, RS = 6;
  localparam int BLO = 2, BHI = 5, RAD = 40, GAIN = 5;

  task automatic wr(input int addr, input int data);
    @(negedge clk); prog_we = 1; prog_addr = 16'(addr); prog_data = 16'(data);
    @(negedge clk); prog_we = 0;
  endtask

  function automatic longint sat(input longint v, input int sh);
    longint s = v >>> sh;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return s;
  endfunction

  // ---------------- signal model ----------------
  int raw [NCH][$];           // raw signed samples per channel
  longint firf [NCH];         // FIR outputs of the frame being received
  longint firprev [NCH];      // FIR outputs of the previous frame
  longint filt [NCH][$];      // filtered (spatial) history
  int frame = 0;

  // a burst of doubled amplitude between frames 300 and 420 stands in for
  // the rising energy of a seizure, so that the decision takes both values
  function automatic int gen(input int c, input int n);
    real v;
    int code;
    v = ((n >= 300 && n < 420) ? 240.0 : 120.0) * $sin(2.0 * 3.14159265 * real'((c % 6) + 1) * 8.0 * real'(n) / 256.0)
        + real'($urandom_range(0, 60)) - 30.0 + real'(c) * 3.0;
    code = 256 + int'(v);
    return (code < 0) ? 0 : (code > 511) ? 511 : code;
  endfunction

  // ADC: present the code of the selected channel during the slot
  int cur_code;
  always @(posedge clk) if (adc_start) cur_code = gen(ch_sel, frame);
  assign adc_data = 9'(cur_code);

  // Take the sample exactly when the DUT does, then update the model
  int mech_fir = 0, mech_sp = 0, mech_chone = 0;
  always @(posedge clk) if (rst_n && smp_valid) begin
    int c; longint acc;
    c = ch_sel;
    raw[c].push_front(int'(cur_code) - 256);
    acc = 0;
    for (int t = 0; t < TAPS; t++) if (t < raw[c].size()) acc += longint'(a[t]) * raw[c][t];
    firf[c] = sat(acc, FS);
    mech_fir++;
    if (c == 0) mech_chone++;
    if (c == NCH - 1) begin
      for (int o = 0; o < NCH; o++) begin
        longint s;
        s = 0;
        for (int i = 0; i < NCH; i++) s += longint'(w[o][i]) * firprev[i];
        filt[o].push_back(sat(s, SS));
        if (filt[o].size() > 2 * WIN) void'(filt[o].pop_front());
      end
      mech_sp++;
      for (int i = 0; i < NCH; i++) firprev[i] = firf[i];
      frame++;
    end
  end

  // ---------------- expected results at each iteration ----------------
  longint exp_q [$];          // 85 expected words per iteration
  int     band_q [$];         // 1 where the word is a band ratio (tolerance)

  task automatic freeze();
    longint win [NCH][WIN];
    longint feat [NF];
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < WIN; k++)
        win[c][k] = (filt[c].size() >= WIN - k) ? filt[c][filt[c].size() - WIN + k] : 0;
    for (int c = 0; c < NCH; c++) begin
      longint s = 0, q = 0, x = 0, en, mn;
      real re, im, pwr, tot = 0, bnd = 0;
      int cnt = 0;
      for (int k = 0; k < WIN; k++) begin
        s += win[c][k]; q += win[c][k] * win[c][k]; x += win[c][k] * win[partner[c]][k];
      end
      en = q >>> 5; mn = s >>> 5;
      feat[5*c+0] = sat(en, ES);
      feat[5*c+1] = sat(en - mn * mn, VS);
      feat[5*c+2] = sat(x >>> 5, XS);
      for (int b = 1; b <= WIN / 2; b++) begin
        re = 0; im = 0;
        for (int k = 0; k < WIN; k++) begin
          re += real'(win[c][k]) * $cos(2.0 * 3.14159265 * b * k / WIN);
          im -= real'(win[c][k]) * $sin(2.0 * 3.14159265 * b * k / WIN);
        end
        pwr = re * re + im * im;
        tot += pwr;
        if (b >= BLO && b <= BHI) bnd += pwr;
      end
      feat[5*c+3] = (tot == 0.0) ? 0 : longint'(bnd / tot * 32767.0);
      for (int i = 0; i < 15; i++)
        for (int j = i + 1; j < 15; j++) begin
          longint d0 = win[c][16+i] - win[c][16+j], d1 = win[c][17+i] - win[c][17+j];
          if ((d0 < 0 ? -d0 : d0) < RAD && (d1 < 0 ? -d1 : d1) < RAD) cnt++;
        end
      feat[5*c+4] = cnt;
    end
    for (int f = 0; f < NF; f++) begin exp_q.push_back(feat[f]); band_q.push_back(f % 5 == 3); end
    begin
      longint r [NR];
      for (int d = 0; d < NR; d++) begin
        longint s = 0;
        for (int f = 0; f < NF; f++) s += longint'(pw[d][f]) * feat[f];
        r[d] = sat(s, RS);
        exp_q.push_back(r[d]); band_q.push_back(0);
      end
      exp_q.push_back(feat[0] < THRESH ? 0 : 1); band_q.push_back(0);
    end
  endtask

  int n_iter = 0, n_out = 0, n_sets = 0, n_dec1 = 0, n_dec0 = 0, n_overrun = 0;
  int out_in_set = 0, max_band_err = 0;
  bit late = 0;
  longint e, got;
  int isb, err;
  bit checking = 0, armed = 0, done_checking = 0;
  int cfg_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (iter_start) begin
      n_iter++;
      // results are compared from the first iteration whose window was
      // filtered entirely with the final configuration
      if (armed && !done_checking && frame >= cfg_frame + WIN + 2) checking = 1;
      if (checking) begin
        if (out_in_set != 0 || exp_q.size() != 0) late = 1;
        out_in_set = 0;
        freeze();
      end
    end
    if (overrun) n_overrun++;
    if (out_valid && checking && exp_q.size() > 0) begin
      e = exp_q.pop_front();
      isb = band_q.pop_front();
      got = longint'($signed(out_data));
      n_out++;
      out_in_set++;
      if (isb) begin
        err = int'(got - e);
        if (err < 0) err = -err;
        if (err > max_band_err) max_band_err = err;
        check(err <= 1000, $sformatf("band ratio word %0d got %0d exp %0d", out_in_set - 1, got, e));
      end else
        check(got == e, $sformatf("iteration %0d word %0d got %0d exp %0d", n_iter, out_in_set - 1, got, e));
      if (out_in_set == NF + NR + 1) begin
        n_sets++;
        out_in_set = 0;
        if (got == 1) n_dec1++; else n_dec0++;
      end
    end
  end

  int mech_pc = 0;
  always @(posedge clk) if (rst_n && smp_valid) mech_pc++;

  // iteration-rate check: iterations in each whole second of operation
  int iter_at_1s, iter_at_2s;

  initial begin
    automatic logic [15:0] prog [$];
    for (int t = 0; t < TAPS; t++) a[t] = (t < 8) ? $urandom_range(0, 16) - 8 : $urandom_range(0, 4) - 2;
    a[0] = 8;
    for (int o = 0; o < NCH; o++)
      for (int i = 0; i < NCH; i++) w[o][i] = (o == i) ? 4 : $urandom_range(0, 2) - 1;
    for (int c = 0; c < NCH; c++) partner[c] = $urandom_range(0, NCH - 1);
    for (int d = 0; d < NR; d++)
      for (int f = 0; f < NF; f++) pw[d][f] = (f % 5 == 3) ? 0 : $urandom_range(0, 6) - 3;
    for (int c = 0; c < NCH; c++) begin firf[c] = 0; firprev[c] = 0; end

    repeat (3) @(negedge clk);
    rst_n = 1;
    // configuration is written while samples already flow; the model only
    // compares iterations whose windows postdate it
    for (int t = 0; t < TAPS; t++) wr(t, a[t]);
    for (int o = 0; o < NCH; o++) for (int i = 0; i < NCH; i++) wr('h100 + 16 * o + i, w[o][i]);
    for (int c = 0; c < NCH; c++) wr('h200 + c, partner[c]);
    wr('h300, FS); wr('h301, SS); wr('h302, BLO); wr('h303, BHI); wr('h304, RAD);
    wr('h305, GAIN); wr('h306, ES); wr('h307, VS); wr('h308, XS); wr('h309, RS);
    for (int d = 0; d < NR; d++) for (int f = 0; f < NF; f++) wr('h400 + 128 * d + f, pw[d][f]);
    // RISC program: output features, reduced values and a decision
    prog = '{enc_li(1, 0), enc_li(2, 80), enc_i(OP_LW, 3, 1, 0), enc_r(OP_OUT, 3, 0, 0),
             enc_i(OP_ADDI, 1, 1, 1), enc_i(OP_BLT, 1, 2, -4),
             enc_li(1, 96), enc_li(2, 100), enc_i(OP_LW, 3, 1, 0), enc_r(OP_OUT, 3, 0, 0),
             enc_i(OP_ADDI, 1, 1, 1), enc_i(OP_BLT, 1, 2, -4),
             enc_i(OP_LW, 4, 0, 0), enc_li(5, THRESH), enc_li(6, 0),
             enc_i(OP_BLT, 4, 5, 1), enc_li(6, 1), enc_r(OP_OUT, 6, 0, 0), enc_r(OP_HALT, 0, 0, 0)};
    for (int i = 0; i < prog.size(); i++) wr('h8000 + i, prog[i]);
    cfg_frame = frame;
    armed = 1;

    // run 2.5 seconds of signal
    repeat (49152) @(posedge clk);
    iter_at_1s = n_iter;
    check(pga_gain == 4'(GAIN), "gain code follows the configuration");
    repeat (49152) @(posedge clk);
    iter_at_2s = n_iter;
    check(iter_at_2s - iter_at_1s == 10, $sformatf("10 iterations per second, got %0d", iter_at_2s - iter_at_1s));
    repeat (24576) @(posedge clk);

    // slow program: a delay loop longer than the iteration period
    wait (out_in_set == 0 && exp_q.size() == 0);
    repeat (20) @(posedge clk);
    checking = 0;
    done_checking = 1;
    prog = '{enc_li(3, 0), enc_li(4, 20), enc_li(1, 0), enc_li(2, 255),
             enc_i(OP_ADDI, 1, 1, 1), enc_i(OP_BLT, 1, 2, -2),
             enc_i(OP_ADDI, 3, 3, 1), enc_i(OP_BLT, 3, 4, -6), enc_r(OP_HALT, 0, 0, 0)};
    for (int i = 0; i < prog.size(); i++) wr('h8000 + i, prog[i]);
    repeat (30000) @(posedge clk);

    $display("mechanisms: fir=%0d spatial_frames=%0d ch_one=%0d slots=%0d iterations=%0d result_sets=%0d decisions0=%0d decisions1=%0d overruns=%0d max_band_err=%0d",
             mech_fir, mech_sp, mech_chone, mech_pc, n_iter, n_sets, n_dec0, n_dec1, n_overrun, max_band_err);
    check(mech_fir > 0, "temporal FIR ran");
    check(mech_sp > 0, "spatial filter frames");
    check(mech_chone > 0, "channel-one indicator");
    check(n_sets >= 20, "result sets from the RISC");
    check(n_dec0 > 0 && n_dec1 > 0, "both decisions taken");
    check(n_overrun > 0, "iteration overrun provoked");
    check(!late, "each result set complete before the next iteration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
