// bypass_rename_tb: checks renaming with memory instruction bypassing for a
// 4-wide decode bundle.
//
// A reference model keeps its own main map, secondary map and free set,
// renames the slots of a bundle one after the other and takes free registers
// lowest number first; a slot that cannot get its registers stalls together
// with every later slot. Part 1 is directed: a pref# with mask 1011 to base
// register 8 makes special mappings r8, r9, r10; the loads to r8..r10 are
// bypassed and receive exactly those registers, a load to r11 is not; a
// load# renames its first element normally; a pref# and two of its loads in
// one bundle are bypassed within the bundle; a consumer in the same bundle
// reads the bypassed register. Part 2 is random bundles of all operation
// kinds, with registers returned one cycle after the bundle (an immediate
// commit), and a phase with commits held back so that the free list runs dry
// and slots stall.
module bypass_rename_tb
  import cdpb_pkg::*;
;
  localparam int unsigned W = 4, LR = 32, PR = 96, E = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] dec_valid = 0;
  op_e  [W-1:0] dec_op;
  logic [W-1:0][4:0] dec_dest = 0;
  logic [W-1:0][E-1:0] dec_mask = 0;
  logic [W-1:0][1:0][4:0] dec_src = 0;
  logic [W-1:0][1:0][6:0] src_preg;
  logic [W-1:0] dec_stall, dec_bypassed;
  logic [W-1:0][6:0] dec_pdest, dec_old_pdest;
  logic [W-1:0][E-1:0][6:0] dec_pregs, dec_stale_preg;
  logic [W-1:0][2:0] dec_nregs;
  logic [W-1:0][E-1:0] dec_stale;
  logic [PR-1:0] alloc_vec, free_vec = 0;
  int checks = 0, failures = 0, c_byp = 0, c_stall = 0, c_stale = 0, c_grp = 0, c_inbundle = 0;

  bypass_rename dut (.*);
  always #5 clk = ~clk;

  int  m_rat[LR], m_sec[LR];
  bit  m_secv[LR], m_free[PR];
  logic [PR-1:0] pend_free, held;
  bit  last_grp_slot[LR];   // logical register got its special mapping in this bundle

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // Model the whole bundle; check every slot; return registers to release.
  task automatic model_bundle(output logic [PR-1:0] rel);
    bit blocked = 0;
    logic [PR-1:0] exp_alloc = '0;
    rel = '0;
    for (int i = 0; i < LR; i++) last_grp_slot[i] = 0;
    for (int k = 0; k < W; k++) begin
      int need, n, picks[E], got, l;
      bit hit, stall;
      n = 0;
      for (int j = 0; j < E; j++) n += dec_mask[k][j];
      for (int s = 0; s < 2; s++) check(src_preg[k][s] == 7'(m_rat[dec_src[k][s]]), "src_preg");
      if (!dec_valid[k]) continue;
      hit = m_secv[dec_dest[k]];
      case (dec_op[k])
        OP_OTHER: need = 1;
        OP_LOAD:  need = hit ? 0 : 1;
        default:  need = n;
      endcase
      got = 0;
      for (int i = 0; i < PR && got < need; i++) if (m_free[i]) picks[got++] = i;
      stall = blocked || (got < need);
      check(dec_stall[k] == stall, "dec_stall");
      if (dec_stall[k] != stall) $display("  k=%0d op=%s need=%0d got=%0d blocked=%0d nfree_dut=%0d", k, dec_op[k].name(), need, got, blocked, $countones(dut.free_q));
      if (stall) begin c_stall++; blocked = 1; continue; end
      check(dec_bypassed[k] == (dec_op[k] == OP_LOAD && hit), "dec_bypassed");
      check(dec_old_pdest[k] == 7'(m_rat[dec_dest[k]]), "dec_old_pdest");
      for (int j = 0; j < need; j++) begin m_free[picks[j]] = 0; exp_alloc[picks[j]] = 1; end
      case (dec_op[k])
        OP_OTHER: begin
          check(dec_pdest[k] == 7'(picks[0]), "pdest other");
          rel[m_rat[dec_dest[k]]] = 1; m_rat[dec_dest[k]] = picks[0];
        end
        OP_LOAD: begin
          if (hit) begin
            c_byp++;
            if (last_grp_slot[dec_dest[k]]) c_inbundle++;
            check(dec_pdest[k] == 7'(m_sec[dec_dest[k]]), "pdest bypassed");
            rel[m_rat[dec_dest[k]]] = 1; m_rat[dec_dest[k]] = m_sec[dec_dest[k]]; m_secv[dec_dest[k]] = 0;
          end else begin
            check(dec_pdest[k] == 7'(picks[0]), "pdest load");
            rel[m_rat[dec_dest[k]]] = 1; m_rat[dec_dest[k]] = picks[0];
          end
        end
        default: begin
          c_grp++;
          check(dec_nregs[k] == 3'(n), "dec_nregs");
          for (int j = 0; j < n; j++) begin
            l = (dec_dest[k] + j) % LR;
            check(dec_pregs[k][j] == 7'(picks[j]), "dec_pregs");
            check(dec_stale[k][j] == m_secv[l], "dec_stale");
            if (m_secv[l]) begin
              check(dec_stale_preg[k][j] == 7'(m_sec[l]), "dec_stale_preg");
              rel[m_sec[l]] = 1; c_stale++;
            end
            if (j == 0 && dec_op[k] == OP_LOADB) begin
              rel[m_rat[l]] = 1; m_rat[l] = picks[0]; m_secv[l] = 0;
            end else begin
              m_sec[l] = picks[j]; m_secv[l] = 1; last_grp_slot[l] = 1;
            end
          end
        end
      endcase
    end
    check(alloc_vec == exp_alloc, "alloc_vec");
  endtask

  // Present one bundle for one cycle (stalled slots are simply dropped).
  task automatic bundle(input bit do_free);
    logic [PR-1:0] rel;
    free_vec = pend_free;
    #1 model_bundle(rel);
    for (int i = 0; i < PR; i++) if (pend_free[i]) m_free[i] = 1;
    if (do_free) begin
      pend_free = rel | held;   // registers held back are returned late
      held = '0;
    end else begin
      held |= rel;
      pend_free = '0;
    end
    @(negedge clk);
    dec_valid = '0;
  endtask

  task automatic slot(input int k, input op_e op, input int dest, input logic [E-1:0] mask);
    dec_valid[k] = 1; dec_op[k] = op; dec_dest[k] = 5'(dest); dec_mask[k] = mask;
    dec_src[k][0] = 5'($urandom_range(0, LR - 1)); dec_src[k][1] = 5'(dest);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < LR; i++) begin m_rat[i] = i; m_secv[i] = 0; m_sec[i] = 0; end
    for (int i = 0; i < PR; i++) m_free[i] = (i >= LR);
    pend_free = '0; held = '0;
    for (int k = 0; k < W; k++) dec_op[k] = OP_OTHER;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- directed ----
    slot(0, OP_PREFB, 8, 4'b1011);    // r8,r9,r10 get p32,p33,p34
    #1 check(dec_pregs[0][0] == 32 && dec_pregs[0][1] == 33 && dec_pregs[0][2] == 34, "pref# registers");
    bundle(1);
    slot(0, OP_LOAD, 8, 0); slot(1, OP_LOAD, 9, 0); slot(2, OP_LOAD, 10, 0); slot(3, OP_LOAD, 11, 0);
    #1 check(dec_bypassed == 4'b0111 && dec_pdest[0] == 32 && dec_pdest[1] == 33 && dec_pdest[2] == 34,
             "loads r8..r10 bypassed, r11 not");
    bundle(1);
    slot(0, OP_LOADB, 20, 4'b0110); slot(1, OP_LOAD, 20, 0); slot(2, OP_LOAD, 21, 0);
    #1 check(dec_bypassed == 4'b0100, "load# primary renamed normally, second element bypassed in bundle");
    bundle(1);
    slot(0, OP_PREFB, 12, 4'b0011); slot(1, OP_LOAD, 12, 0); slot(2, OP_OTHER, 5, 0);
    dec_src[2][0] = 5'd12;
    #1 check(dec_bypassed[1] && dec_pdest[1] == dec_pregs[0][0] && src_preg[2][0] == dec_pregs[0][0],
             "bypass and consumer inside one bundle");
    bundle(1);
    // ---- random ----
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < W; k++) begin
        automatic int r = $urandom_range(0, 11);
        automatic op_e op = (r < 3) ? OP_OTHER : (r < 8) ? OP_LOAD : (r < 10) ? OP_PREFB : OP_LOADB;
        if ($urandom_range(0, 7) != 0) slot(k, op, $urandom_range(0, 15), 4'($urandom));
      end
      bundle(!(n >= 2000 && n < 2030));
    end
    check(c_byp > 100 && c_stall > 0 && c_stale > 0 && c_inbundle > 0, "bypass, in-bundle bypass, stall and stale mapping exercised");
    $display("bypassed=%0d in_bundle=%0d groups=%0d stalls=%0d stale=%0d", c_byp, c_inbundle, c_grp, c_stall, c_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
