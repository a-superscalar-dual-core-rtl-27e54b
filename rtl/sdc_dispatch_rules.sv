// sdc_dispatch_rules: superscalar-mode dispatch decision (combinational).
//
// Given the pre-decoded pair I0 (at pc) and I1 (at pc+4), the in-flight
// entries of both pipelines (ID, EXE, and MEM while the arbiter holds it:
// whatever an instruction issued now could still read too early or overtake)
// and whether each core can accept an instruction, it decides
// whether I0 is issued and to which core, and whether I1 is issued with it (to
// the other core).
//
// The pair is issued when (rules of the architecture)
//   1. both are Type0 or Type1,
//   2. I1 has no RAW or WAW hazard on I0,
//   3. if I0 sets the flags, I1's condition is AL (already implied by rule 1,
//      since a condition other than AL makes an instruction Type3),
//   4. a. neither has a RAW hazard with either pipeline: I0->A, I1->B, or
//      b. I0 depends only on CORE_A and I1 not on CORE_A: I0->A, I1->B, or
//      c. I0 depends only on CORE_B and I1 not on CORE_B: I0->B, I1->A.
// An instruction may only go to a core if it has no RAW hazard with the other
// core's pipeline (there is no forwarding between the cores); if I0 depends on
// both pipelines nothing is issued. With one core stalled only I0 is
// considered, for the other core. WAW and WAR hazards against the other core's
// pipeline are checked for every issue.
//
// This design's own additions, all on the safe side: the WAW/WAR check against
// the other core is made whether or not that core is stalled (a core can stall
// after the check); the pair also needs no WAR hazard of I1 on I0; flags and
// memory are tracked as resources (see sdc_pkg), so a store and a load of the
// two cores are never reordered; control flow, Type2 and Type4 go only to
// CORE_A, a move only to CORE_B; a single I0 free of hazards goes to CORE_A.
module sdc_dispatch_rules
  import sdc_pkg::*;
(
  input  pdec_t     pd0,
  input  pdec_t     pd1,
  input  hz_entry_t win_a [NWIN],
  input  hz_entry_t win_b [NWIN],
  input  logic      acc_a,
  input  logic      acc_b,
  output logic      issue0,
  output logic      core0,      // 0: I0 to CORE_A, 1: I0 to CORE_B
  output logic      issue1,     // I1 to the other core
  // why, for statistics
  output logic      ev_dual,
  output logic      ev_raw_both,
  output logic      ev_order,
  output logic      ev_one_stalled
);

  resmask_t dst_a, src_a, dst_b, src_b;
  logic raw0a, raw0b, raw1a, raw1b, ord0a, ord0b, ord1a, ord1b;
  logic type_pair, no_pair_hz, flag_ok, r4a, r4b, r4c, pair_ok, pair_to_b;
  logic canA, canB, typeA, typeB;

  always_comb begin
    dst_a = '0; src_a = '0; dst_b = '0; src_b = '0;
    for (int k = 0; k < NWIN; k++) begin
      if (win_a[k].valid) begin dst_a |= win_a[k].dst; src_a |= win_a[k].src; end
      if (win_b[k].valid) begin dst_b |= win_b[k].dst; src_b |= win_b[k].src; end
    end
    raw0a = |(pd0.src & dst_a);
    raw0b = |(pd0.src & dst_b);
    raw1a = |(pd1.src & dst_a);
    raw1b = |(pd1.src & dst_b);
    ord0a = |(pd0.dst & (dst_a | src_a));
    ord0b = |(pd0.dst & (dst_b | src_b));
    ord1a = |(pd1.dst & (dst_a | src_a));
    ord1b = |(pd1.dst & (dst_b | src_b));

    // rule 1
    type_pair = (pd0.itype inside {T0_DP, T1_LDST}) && (pd1.itype inside {T0_DP, T1_LDST}) &&
                pd0.ext == EXT_NONE && pd1.ext == EXT_NONE;
    // rule 2 (plus WAR of I1 on I0)
    no_pair_hz = !(|(pd1.src & pd0.dst)) && !(|(pd1.dst & pd0.dst)) && !(|(pd1.dst & pd0.src));
    // rule 3
    flag_ok = !pd0.sets_flags || pd1.cond_al;
    // rule 4
    r4a = !raw0a && !raw0b && !raw1a && !raw1b;
    r4b = raw0a && !raw0b && !raw1a;
    r4c = raw0b && !raw0a && !raw1b;
    pair_to_b = r4c;
    pair_ok = acc_a && acc_b && type_pair && no_pair_hz && flag_ok && (r4a || r4b || r4c) &&
              (pair_to_b ? (!ord0a && !ord1b) : (!ord0b && !ord1a));

    // single issue of I0
    typeA = pd0.ext == EXT_NONE;
    typeB = (pd0.ext == EXT_MOVE) ||
            (pd0.ext == EXT_NONE && !pd0.is_ctrl &&
             (pd0.itype inside {T0_DP, T1_LDST} ||
              (pd0.itype == T3_CTRL && pd0.dst != '1)));
    canA = acc_a && typeA && !raw0b && !ord0b;
    canB = acc_b && typeB && !raw0a && !ord0a;

    if (pair_ok) begin
      issue0 = 1'b1; core0 = pair_to_b; issue1 = 1'b1;
    end else begin
      issue0 = canA || canB; core0 = !canA; issue1 = 1'b0;
    end

    ev_dual        = pair_ok;
    ev_raw_both    = raw0a && raw0b;
    ev_order       = !issue0 && !(raw0a && raw0b) && (acc_a || acc_b) &&
                     ((acc_a && typeA && !raw0b && ord0b) || (acc_b && typeB && !raw0a && ord0a));
    ev_one_stalled = issue0 && (acc_a != acc_b);
  end

endmodule
