// bypass_rename: register renaming with compiler-directed memory instruction
// bypassing, for a decode bundle of DEC_W instructions per cycle.
//
// Holds the main map table (logical -> physical register), the free list of
// physical registers and a secondary map table of "special mappings", one
// optional entry per logical register. The slots of a bundle are renamed in
// program order, each one seeing the effect of the slots before it:
//   OP_OTHER  dest gets a fresh physical register (normal renaming).
//   OP_LOAD   if dest has a special mapping, the load is bypassed: the
//             mapping moves from the secondary table into the main table and
//             dec_bypassed tells the core not to send the load to the
//             load/store unit; otherwise it is renamed like OP_OTHER.
//   OP_PREFB  pref#: for the j-th requested element of the line (j counted
//             over the set bits of dec_mask, in line order) a fresh physical
//             register is taken and a special mapping dest+j -> it is made.
//             The main table is untouched, so older instructions still see
//             the old values of those logical registers.
//   OP_LOADB  load#: as pref#, except that element j=0 is renamed normally
//             into the main table, like the destination of a load.
// A pref# and the loads it covers may sit in the same bundle. dec_pregs lists
// the registers a pref#/load# took, in element order; the core carries them
// to the line binder, which fills them when the line arrives. Until then
// their ready bits stay clear (see phys_regfile), which is the scoreboarding
// a bypassed load's consumers wait on.
//
// The mechanism (secondary table, consecutive destination registers, moving
// the mapping at decode) follows the published scheme, as does the 4-wide
// decode of the default. Indexing the secondary table by logical register,
// reporting overwritten special mappings on dec_stale/dec_stale_preg so that
// the core frees them at commit, and the absence of misprediction recovery
// are this design's choices. Registers named by dec_old_pdest are likewise
// freed by the core at commit through free_vec.
//
// Timing: all outputs are combinational in the decode cycle; the tables
// update at the rising edge. Slot k is renamed when it is valid and the free
// list can supply its registers after slots 0..k-1; dec_stall[k] is set for
// the first valid slot that cannot be renamed and for every valid slot after
// it, which the core presents again next cycle. Registers are taken lowest
// number first. rst_n is synchronous, active low: logical register i maps to
// physical i, registers LOG_REGS and up are free, the secondary table is
// empty.
module bypass_rename
  import cdpb_pkg::*;
#(
  parameter int unsigned DEC_W      = 4,
  parameter int unsigned LOG_REGS   = 32,
  parameter int unsigned PHYS_REGS  = 96,
  parameter int unsigned LINE_ELEMS = 4,
  localparam int unsigned LW  = $clog2(LOG_REGS),
  localparam int unsigned PRW = $clog2(PHYS_REGS),
  localparam int unsigned NW  = $clog2(LINE_ELEMS + 1)
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic [DEC_W-1:0]                            dec_valid,
  input  op_e  [DEC_W-1:0]                            dec_op,
  input  logic [DEC_W-1:0][LW-1:0]                    dec_dest,
  input  logic [DEC_W-1:0][LINE_ELEMS-1:0]            dec_mask,
  input  logic [DEC_W-1:0][1:0][LW-1:0]               dec_src,
  output logic [DEC_W-1:0][1:0][PRW-1:0]              src_preg,
  output logic [DEC_W-1:0]                            dec_stall,
  output logic [DEC_W-1:0]                            dec_bypassed,
  output logic [DEC_W-1:0][PRW-1:0]                   dec_pdest,
  output logic [DEC_W-1:0][PRW-1:0]                   dec_old_pdest,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0][PRW-1:0]   dec_pregs,
  output logic [DEC_W-1:0][NW-1:0]                    dec_nregs,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0]            dec_stale,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0][PRW-1:0]   dec_stale_preg,
  output logic [PHYS_REGS-1:0]                        alloc_vec,
  input  logic [PHYS_REGS-1:0]                        free_vec
);
  // architectural state
  logic [LOG_REGS-1:0][PRW-1:0] rat_q, sec_p_q;
  logic [LOG_REGS-1:0]          sec_v_q;
  logic [PHYS_REGS-1:0]         free_q;
  // state as seen by the slot being renamed (after the slots before it)
  logic [LOG_REGS-1:0][PRW-1:0] rat_w, sec_p_w;
  logic [LOG_REGS-1:0]          sec_v_w;
  logic [PHYS_REGS-1:0]         free_w;

  logic [LINE_ELEMS-1:0][PRW-1:0] pick;
  logic [LINE_ELEMS-1:0]          pick_ok;
  logic [PHYS_REGS-1:0]           taken;
  logic [NW-1:0]                  nmask, need;
  logic                           sec_hit, group, blocked, fire;
  logic [LW-1:0]                  l;

  always_comb begin
    rat_w     = rat_q;
    sec_p_w   = sec_p_q;
    sec_v_w   = sec_v_q;
    free_w    = free_q;
    alloc_vec = '0;
    blocked   = 1'b0;
    pick      = '0;
    pick_ok   = '0;
    taken     = '0;
    nmask     = '0;
    need      = '0;
    sec_hit   = 1'b0;
    group     = 1'b0;
    fire      = 1'b0;
    l         = '0;

    for (int k = 0; k < DEC_W; k++) begin
      for (int s = 0; s < 2; s++) src_preg[k][s] = rat_w[dec_src[k][s]];

      nmask = '0;
      for (int j = 0; j < LINE_ELEMS; j++) nmask = nmask + NW'(dec_mask[k][j]);
      sec_hit = sec_v_w[dec_dest[k]];
      group   = (dec_op[k] == OP_PREFB) || (dec_op[k] == OP_LOADB);
      unique case (dec_op[k])
        OP_OTHER: need = NW'(1);
        OP_LOAD:  need = sec_hit ? '0 : NW'(1);
        default:  need = nmask;
      endcase

      // take the registers this slot needs, lowest numbers first
      taken   = '0;
      pick    = '0;
      pick_ok = '0;
      for (int j = 0; j < LINE_ELEMS; j++) begin
        if (NW'(j) < need) begin
          for (int i = 0; i < PHYS_REGS; i++) begin
            if (free_w[i] && !taken[i] && !pick_ok[j]) begin
              pick_ok[j] = 1'b1;
              pick[j]    = PRW'(i);
              taken[i]   = 1'b1;
            end
          end
        end else begin
          pick_ok[j] = 1'b1;
        end
      end

      dec_stall[k]    = dec_valid[k] && (blocked || !(&pick_ok));
      fire            = dec_valid[k] && !dec_stall[k];
      blocked         = blocked || dec_stall[k];
      dec_bypassed[k] = dec_valid[k] && (dec_op[k] == OP_LOAD) && sec_hit;
      dec_pdest[k]    = dec_bypassed[k] ? sec_p_w[dec_dest[k]] : pick[0];
      dec_old_pdest[k] = rat_w[dec_dest[k]];
      dec_nregs[k]    = group ? nmask : '0;
      dec_pregs[k]    = pick;
      for (int j = 0; j < LINE_ELEMS; j++) begin
        l = dec_dest[k] + LW'(j);
        dec_stale[k][j]      = group && dec_valid[k] && (NW'(j) < nmask) && sec_v_w[l];
        dec_stale_preg[k][j] = sec_p_w[l];
      end

      if (fire) begin
        alloc_vec = alloc_vec | taken;
        free_w    = free_w & ~taken;
        unique case (dec_op[k])
          OP_OTHER: rat_w[dec_dest[k]] = pick[0];
          OP_LOAD: begin
            if (sec_hit) begin
              rat_w[dec_dest[k]]   = sec_p_w[dec_dest[k]];
              sec_v_w[dec_dest[k]] = 1'b0;
            end else begin
              rat_w[dec_dest[k]] = pick[0];
            end
          end
          default: begin  // OP_PREFB, OP_LOADB
            for (int j = 0; j < LINE_ELEMS; j++) begin
              l = dec_dest[k] + LW'(j);
              if (NW'(j) < nmask) begin
                if (j == 0 && dec_op[k] == OP_LOADB) begin
                  rat_w[l]   = pick[j];
                  sec_v_w[l] = 1'b0;
                end else begin
                  sec_p_w[l] = pick[j];
                  sec_v_w[l] = 1'b1;
                end
              end
            end
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LOG_REGS; i++) rat_q[i] <= PRW'(i);
      sec_p_q <= '0;
      sec_v_q <= '0;
      for (int i = 0; i < PHYS_REGS; i++) free_q[i] <= (i >= LOG_REGS);
    end else begin
      rat_q   <= rat_w;
      sec_p_q <= sec_p_w;
      sec_v_q <= sec_v_w;
      free_q  <= free_w | free_vec;
    end
  end

  a_free_once: assert property (@(posedge clk) disable iff (!rst_n) (free_vec & free_q) == '0)
    else $error("bypass_rename: a free register is freed again");
endmodule
