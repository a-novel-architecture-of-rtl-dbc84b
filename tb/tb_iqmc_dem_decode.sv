// tb_iqmc_dem_decode: runs the dematrixing programme of every
// tc_allocation (and every dematrix procedure) on random transmission
// channel values, interpreting the operations the way the datapath does
// (FIFO0/FIFO1 accumulate T0..T4 in order, a FIFO1 "chain" step copies
// FIFO0's previous value), and checks that the five FIFOs end up holding
// exactly the five weighted audio channels given by the MPEG-2 3/2
// equations L0 = L + C + LS, R0 = R + C + RS, each under the right tag.
module tb_iqmc_dem_decode;
  import iqmc_pkg::*;
  logic [2:0] tc_alloc;
  logic [1:0] dematrix;
  dem_prog_t  prog;
  int checks = 0, failures = 0;

  iqmc_dem_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chan_e tch(int mode, int k);
    chan_e t[8][3] = '{
      '{CH_C, CH_LS, CH_RS}, '{CH_L, CH_LS, CH_RS}, '{CH_R, CH_LS, CH_RS},
      '{CH_C, CH_L,  CH_RS}, '{CH_C, CH_LS, CH_R }, '{CH_C, CH_L,  CH_R },
      '{CH_R, CH_L,  CH_RS}, '{CH_L, CH_LS, CH_R }};
    return t[mode][k];
  endfunction

  function automatic longint do_op(addsub_op_e o, longint a, longint b);
    case (o)
      OP_PASS_A: return a;
      OP_PASS_B: return b;
      OP_ADD:    return b + a;
      OP_SUB:    return b - a;
      OP_RSUB:   return a - b;
      default:   return 64'hdead;
    endcase
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int proc = 0; proc < 4; proc++)
        for (int mode = 0; mode < 8; mode++) begin
          longint au [5];     // true weighted audio channels
          longint t  [5];     // transmission channels
          longint fifo [5];
          longint acc0, acc1, prev0;
          bit     seen [5];
          for (int c = 0; c < 5; c++) au[c] = longint'($urandom_range(2000, 0)) - 1000;
          if (proc == 3) begin
            for (int c = 0; c < 5; c++) t[c] = au[c];
          end else begin
            t[0] = au[CH_L] + au[CH_C] + au[CH_LS];
            t[1] = au[CH_R] + au[CH_C] + au[CH_RS];
            for (int k = 0; k < 3; k++) t[k+2] = au[tch(mode, k)];
          end
          tc_alloc = 3'(mode);
          dematrix = 2'(proc);
          #1;
          acc0 = 64'hbad0;
          acc1 = 64'hbad1;   // FIFO1 still holds Phase I data during T0
          for (int k = 0; k < 5; k++) begin
            prev0 = acc0;
            acc0  = do_op(prog.op0[k], t[k], acc0);
            if (k == 0 || prog.f1src[k] == F1_CHAIN) acc1 = prev0;
            else acc1 = do_op(prog.op1[k], t[k], acc1);
          end
          fifo[0] = acc0; fifo[1] = acc1; fifo[2] = t[4]; fifo[3] = t[3]; fifo[4] = t[2];
          for (int c = 0; c < 5; c++) seen[c] = 0;
          for (int f = 0; f < 5; f++) begin
            checks++;
            if (int'(prog.tag[f]) > 4) begin
              failures++;
              $display("mode %0d proc %0d: bad tag %0d", mode, proc, prog.tag[f]);
            end else begin
              seen[prog.tag[f]] = 1;
              if (fifo[f] != au[prog.tag[f]]) begin
                failures++;
                $display("mode %0d proc %0d: FIFO%0d (%s) = %0d, expected %0d", mode, proc,
                         f, prog.tag[f].name(), fifo[f], au[prog.tag[f]]);
              end
            end
          end
          for (int c = 0; c < 5; c++) begin
            checks++;
            if (!seen[c]) begin failures++; $display("mode %0d proc %0d: channel %0d missing", mode, proc, c); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
