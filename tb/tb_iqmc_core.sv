// tb_iqmc_core: end-to-end test of the IQ/MC core at its default size.
//
// Sends granules through the core and compares every output sample and
// channel tag with a reference model written from the MPEG audio
// equations, independent of the core's schedule:
//   Q = C*Q' + C*D           (C, D from the number of quantization steps)
//   T = SF*Q                 (SF = 2**(1 - idx/3), crosstalk: SF of sf_src)
//   the two channels not transmitted in T2..T4 are solved from
//   L0 = L + C + LS, R0 = R + C + RS (first the one that depends on T's
//   only, then the other), A = A^w * N.
// Tables are computed here with real arithmetic.  Products are truncated
// toward minus infinity to 20 fraction bits as in the core.
// Every tc_allocation and dematrix procedure is run, with and without
// dynamic crosstalk, back to back and with idle gaps; the timing checks
// are 33 cycles from the first input to the first output, 15 consecutive
// output cycles, and a 47-cycle period between back-to-back granules.
// Each mechanism is counted and one that never occurred is a failure.
module tb_iqmc_core;
  import iqmc_pkg::*;

  localparam int F = 20;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic       in_ready;
  gran_info_t in_info;
  word_t      in_sample;
  logic       out_valid;
  chan_e      out_chan;
  word_t      out_sample;

  int checks = 0, failures = 0;
  longint cyc = 0;

  iqmc_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference tables ----------------
  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction
  function automatic int steps_of(int q);
    int s[4] = '{3, 5, 7, 9};
    return (q < 4) ? s[q] : (1 << q) - 1;
  endfunction
  function automatic int bits_of(int q);
    int b[4] = '{2, 3, 3, 4};
    return (q < 4) ? b[q] : q;
  endfunction
  function automatic longint c_fx(int q);
    return rnd((2.0 ** bits_of(q)) / steps_of(q) * (2.0 ** F));
  endfunction
  function automatic longint dp_fx(int q);  // C*D with D = 1 - (steps-1)/2**bits
    real c, d;
    c = (2.0 ** bits_of(q)) / steps_of(q);
    d = 1.0 - (steps_of(q) - 1) / (2.0 ** bits_of(q));
    return rnd(c * d * (2.0 ** F));
  endfunction
  function automatic longint sf_fx(int i);
    return rnd((2.0 ** (1.0 - (i % 3) / 3.0)) * (2.0 ** F)) >>> (i / 3);
  endfunction
  function automatic longint n_fx(int proc, chan_e ch);
    real s2, a, b, g, n;
    s2 = $sqrt(2.0);
    case (proc)
      1:       begin a = 1.0 / (1.5 + 0.5 * s2); b = 1.0 / s2; g = 0.5; end
      3:       begin a = 1.0; b = 1.0; g = 1.0; end
      default: begin a = 1.0 / (1.0 + s2); b = 1.0 / s2; g = 1.0 / s2; end
    endcase
    case (ch)
      CH_L, CH_R: n = 1.0 / a;
      CH_C:       n = 1.0 / (a * b);
      default:    n = 1.0 / (a * g);
    endcase
    return rnd(n * (2.0 ** F));
  endfunction
  function automatic longint sat24(longint v);
    if (v > 64'sd8388607)  return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction
  function automatic longint mul(longint a, longint b);
    return sat24((a * b) >>> F);
  endfunction

  // MPEG-2 3/2 tc_allocation: audio channels carried in T2, T3, T4
  function automatic chan_e tch(int mode, int k);
    chan_e t[8][3] = '{
      '{CH_C, CH_LS, CH_RS}, '{CH_L, CH_LS, CH_RS}, '{CH_R, CH_LS, CH_RS},
      '{CH_C, CH_L,  CH_RS}, '{CH_C, CH_LS, CH_R }, '{CH_C, CH_L,  CH_R },
      '{CH_R, CH_L,  CH_RS}, '{CH_L, CH_LS, CH_R }};
    return t[mode][k];
  endfunction

  // ---------------- expected results ----------------
  typedef struct {
    chan_e  ch [15];
    longint v  [15];
    bit     free_order;   // last 6 samples: two channels in either order
  } exp_t;

  exp_t   expq[$];
  longint startq[$];
  longint last_start = -1000;

  // mechanism counters
  int n_pat_indep = 0, n_pat_dep_c_from_l0 = 0, n_pat_dep_c_from_r0 = 0,
      n_no_dematrix = 0, n_crosstalk = 0, n_back_to_back = 0, n_idle_gap = 0,
      n_modes[8], n_proc[4];

  function automatic exp_t model(gran_info_t gi, word_t smp[15]);
    exp_t   e;
    longint t [5][3];
    longint aw [5][3];   // weighted audio channels, indexed by chan_e
    bit     have [5];
    int     mode, proc;
    mode = int'(gi.tc_alloc);
    proc = int'(gi.dematrix);
    for (int ch = 0; ch < 5; ch++) begin
      int q, s;
      q = int'(gi.qclass[ch]);
      s = (gi.sf_src[ch] <= 3'd4) ? int'(gi.sf_src[ch]) : ch;
      for (int j = 0; j < 3; j++) begin
        longint qq;
        qq = sat24(mul(c_fx(q), longint'(smp[3*ch+j])) + dp_fx(q));
        t[ch][j] = mul(sf_fx(int'(gi.sf_idx[s])), qq);
      end
    end
    for (int c = 0; c < 5; c++) have[c] = 0;
    if (proc == 3) begin
      chan_e nm[5] = '{CH_L, CH_R, CH_C, CH_LS, CH_RS};
      for (int c = 0; c < 5; c++) begin
        for (int j = 0; j < 3; j++) aw[nm[c]][j] = t[c][j];
        have[nm[c]] = 1;
      end
      e.free_order = 0;
      // order: T2, T3, T4, T1, T0
      for (int j = 0; j < 3; j++) begin
        e.ch[j] = CH_C;  e.ch[3+j] = CH_LS; e.ch[6+j] = CH_RS;
        e.ch[9+j] = CH_R; e.ch[12+j] = CH_L;
      end
    end else begin
      for (int k = 2; k < 5; k++) begin
        for (int j = 0; j < 3; j++) aw[tch(mode, k-2)][j] = t[k][j];
        have[tch(mode, k-2)] = 1;
      end
      for (int j = 0; j < 3; j++) begin
        longint l0, r0;
        l0 = t[0][j]; r0 = t[1][j];
        if (have[CH_C]) begin
          chan_e lm, rm;
          lm = have[CH_L] ? CH_LS : CH_L;
          rm = have[CH_R] ? CH_RS : CH_R;
          aw[lm][j] = l0 - aw[CH_C][j] - (have[CH_L] ? aw[CH_L][j] : aw[CH_LS][j]);
          aw[rm][j] = r0 - aw[CH_C][j] - (have[CH_R] ? aw[CH_R][j] : aw[CH_RS][j]);
        end else if (have[CH_L] && have[CH_LS]) begin
          aw[CH_C][j] = l0 - aw[CH_L][j] - aw[CH_LS][j];
          if (have[CH_R]) aw[CH_RS][j] = r0 - aw[CH_C][j] - aw[CH_R][j];
          else            aw[CH_R][j]  = r0 - aw[CH_C][j] - aw[CH_RS][j];
        end else begin
          aw[CH_C][j] = r0 - aw[CH_R][j] - aw[CH_RS][j];
          if (have[CH_L]) aw[CH_LS][j] = l0 - aw[CH_C][j] - aw[CH_L][j];
          else            aw[CH_L][j]  = l0 - aw[CH_C][j] - aw[CH_LS][j];
        end
      end
      e.free_order = 1;
      for (int j = 0; j < 3; j++) begin
        e.ch[j] = tch(mode, 0); e.ch[3+j] = tch(mode, 1); e.ch[6+j] = tch(mode, 2);
      end
      // the two solved channels, in either order
      begin
        int p;
        p = 9;
        for (int c = 0; c < 5; c++)
          if (!have[c]) begin
            for (int j = 0; j < 3; j++) e.ch[p+j] = chan_e'(c);
            p += 3;
          end
      end
    end
    for (int i = 0; i < 15; i++)
      e.v[i] = mul(n_fx(proc, e.ch[i]), aw[e.ch[i]][i % 3]);
    return e;
  endfunction

  // ---------------- stimulus ----------------
  task automatic send(gran_info_t gi, bit gap);
    word_t smp[15];
    for (int ch = 0; ch < 5; ch++) begin
      int q, b, st;
      q  = int'(gi.qclass[ch]);
      b  = bits_of(q);
      st = steps_of(q);
      for (int j = 0; j < 3; j++) begin
        int code;
        code = int'($urandom_range(st - 1, 0));
        smp[3*ch+j] = word_t'((longint'(code) - (longint'(1) << (b-1))) <<< (F - (b-1)));
      end
    end
    while (!in_ready) @(negedge clk);
    if (gap) repeat ($urandom_range(3, 1)) @(negedge clk);
    expq.push_back(model(gi, smp));
    for (int i = 0; i < 15; i++) begin
      in_valid  = 1'b1;
      in_info   = (i == 0) ? gi : gran_info_t'($urandom());
      in_sample = smp[i];
      @(posedge clk);
      if (i == 0) begin
        if (cyc - last_start == 47) n_back_to_back++;
        else                        n_idle_gap++;
        last_start = cyc;
        startq.push_back(cyc);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_sample = word_t'($urandom());
  endtask

  function automatic gran_info_t rand_info(int mode, int proc, bit xtalk);
    gran_info_t gi;
    for (int ch = 0; ch < 5; ch++) begin
      gi.qclass[ch] = 5'($urandom_range(16, 0));
      gi.sf_idx[ch] = 6'($urandom_range(62, 9));
      gi.sf_src[ch] = 3'(ch);
    end
    if (xtalk) begin
      int y;
      y = int'($urandom_range(4, 2));
      gi.sf_src[y] = 3'($urandom_range(4, 0));
      if (gi.sf_src[y] == 3'(y)) gi.sf_src[y] = 3'((y + 1) % 5);
    end
    gi.tc_alloc = 3'(mode);
    gi.dematrix = 2'(proc);
    return gi;
  endfunction

  // ---------------- checker ----------------
  int     ocount = 0;
  chan_e  och [15];
  longint ov  [15];
  longint first_out_cyc;
  longint prev_out_cyc = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocount == 0) first_out_cyc = cyc;
      else begin
        checks++;
        if (cyc != prev_out_cyc + 1) begin
          failures++;
          $display("output samples not on consecutive cycles at %0d", cyc);
        end
      end
      prev_out_cyc = cyc;
      och[ocount] = out_chan;
      ov[ocount]  = longint'(out_sample);
      ocount++;
      if (ocount == 15) begin
        exp_t   e;
        longint st;
        ocount = 0;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected output granule");
        end else begin
          e  = expq.pop_front();
          st = startq.pop_front();
          checks++;
          if (first_out_cyc - st != 33) begin
            failures++;
            $display("latency %0d, expected 33", first_out_cyc - st);
          end
          for (int i = 0; i < 15; i++) begin
            int ei;
            ei = i;
            if (e.free_order && i >= 9 && och[9] != e.ch[9]) ei = (i < 12) ? i + 3 : i - 3;
            checks++;
            if (och[i] != e.ch[ei] || ov[i] != e.v[ei]) begin
              failures++;
              $display("granule out %0d: got %s %0d, expected %s %0d", i,
                       och[i].name(), ov[i], e.ch[ei].name(), e.v[ei]);
            end
          end
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    rst_n     = 1'b0;
    in_valid  = 1'b0;
    in_info   = '0;
    in_sample = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++)
      for (int proc = 0; proc < 4; proc++)
        for (int mode = 0; mode < 8; mode++) begin
          bit xt;
          xt = (((mode + proc + rep) % 3) == 0);
          n_modes[mode]++;
          n_proc[proc]++;
          if (xt) n_crosstalk++;
          if (proc == 3) n_no_dematrix++;
          else if (mode == 1 || mode == 7) n_pat_dep_c_from_l0++;
          else if (mode == 2 || mode == 6) n_pat_dep_c_from_r0++;
          else n_pat_indep++;
          send(rand_info(mode, proc, xt), (mode % 4) == 3);
        end
    repeat (60) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d granules never came out", expq.size());
    end
    // every mechanism must have happened
    begin
      int m [7];
      m = '{n_pat_indep, n_pat_dep_c_from_l0, n_pat_dep_c_from_r0, n_no_dematrix,
            n_crosstalk, n_back_to_back, n_idle_gap};
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
      for (int i = 0; i < 8; i++) begin checks++; if (n_modes[i] == 0) failures++; end
      for (int i = 0; i < 4; i++) begin checks++; if (n_proc[i] == 0) failures++; end
    end
    $display("independent=%0d dep(C from L0)=%0d dep(C from R0)=%0d no-dematrix=%0d crosstalk=%0d back-to-back=%0d gap=%0d",
             n_pat_indep, n_pat_dep_c_from_l0, n_pat_dep_c_from_r0, n_no_dematrix,
             n_crosstalk, n_back_to_back, n_idle_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
