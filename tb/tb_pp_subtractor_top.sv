// tb_pp_subtractor_top: end-to-end test of the four parity-preserving
// circuits and their fault detectors.
//
// Part 1 drives every combination of the eleven data inputs (2^11 patterns)
// and checks each circuit against its arithmetic or logic equations, and that
// no fault flag is raised in the fault-free design.
// Part 2 injects single stuck-at faults: for every internal line between two
// gates of each circuit, and for both stuck values, it forces the line and
// checks that the circuit's fault flag goes to 1 exactly when the stuck value
// differs from the line's fault-free value (a flipped line), and stays 0
// otherwise.
// Mechanisms counted, each of which must occur: a half-subtractor borrow, a
// full-subtractor borrow generated by A'B, a full-subtractor borrow passed on
// from the borrow-in, the AB term toggling the Peres R output, the AB' term
// toggling the TR R output, and a detected fault in each of the four circuits.
module tb_pp_subtractor_top;

  logic       hs_a, hs_b, hs_diff, hs_borrow, hs_fault;
  logic [1:0] hs_garbage;
  logic       fs_a, fs_b, fs_c, fs_diff, fs_borrow, fs_fault;
  logic [4:0] fs_garbage;
  logic       pg_a, pg_b, pg_c, pg_p, pg_q, pg_r, pg_fault;
  logic [1:0] pg_garbage;
  logic       tr_a, tr_b, tr_c, tr_p, tr_q, tr_r, tr_fault;
  logic [1:0] tr_garbage;

  int checks = 0, failures = 0;
  int n_hs_borrow = 0, n_fs_borrow_gen = 0, n_fs_borrow_prop = 0;
  int n_pg_and = 0, n_tr_andn = 0;
  int n_hs_det = 0, n_fs_det = 0, n_pg_det = 0, n_tr_det = 0;

  pp_subtractor_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Force one internal line to a stuck value for every input pattern of its
  // circuit and compare the circuit's fault flag with the expected one.
  `define TB_STUCK_AT(LINE, FLAG, COUNT, INPUTS, NBITS)                        \
    for (int sv = 0; sv < 2; sv++) begin                                       \
      for (int i = 0; i < (1 << NBITS); i++) begin                             \
        logic good;                                                            \
        INPUTS = NBITS'(i);                                                    \
        #1;                                                                    \
        good = LINE;                                                           \
        check(FLAG == 1'b0, $sformatf("%s: flag without fault", `"LINE`"));    \
        if (sv == 0) force LINE = 1'b0; else force LINE = 1'b1;                \
        #1;                                                                    \
        check(FLAG == (good != 1'(sv)),                                        \
              $sformatf("%s stuck at %0d, input %0d: flag %0b",                \
                        `"LINE`", sv, i, FLAG));                               \
        if (FLAG) COUNT++;                                                     \
        release LINE;                                                          \
        #1;                                                                    \
      end                                                                      \
    end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- part 1: all input patterns, fault free -------------
    for (int i = 0; i < (1 << 11); i++) begin
      {hs_a, hs_b, fs_a, fs_b, fs_c, pg_a, pg_b, pg_c, tr_a, tr_b, tr_c} = 11'(i);
      #1;
      check(int'(hs_a) - int'(hs_b) == int'(hs_diff) - 2 * int'(hs_borrow), "half subtractor");
      check(int'(fs_a) - int'(fs_b) - int'(fs_c) == int'(fs_diff) - 2 * int'(fs_borrow),
            "full subtractor");
      check({pg_p, pg_q, pg_r} == {pg_a, pg_a ^ pg_b, (pg_a & pg_b) ^ pg_c}, "Peres gate");
      check({tr_p, tr_q, tr_r} == {tr_a, tr_a ^ tr_b, (tr_a & ~tr_b) ^ tr_c}, "TR gate");
      check({hs_fault, fs_fault, pg_fault, tr_fault} == 4'b0000, "fault flag in fault-free run");
      // Parity of the complete output vector, garbage included, equals
      // the parity of the data inputs (the constant inputs are all zero).
      check(^{hs_a, hs_b} == ^{hs_diff, hs_borrow, hs_garbage}, "half subtractor parity");
      check(^{fs_a, fs_b, fs_c} == ^{fs_diff, fs_borrow, fs_garbage}, "full subtractor parity");
      check(^{pg_a, pg_b, pg_c} == ^{pg_p, pg_q, pg_r, pg_garbage}, "Peres parity");
      check(^{tr_a, tr_b, tr_c} == ^{tr_p, tr_q, tr_r, tr_garbage}, "TR parity");
      if (hs_borrow) n_hs_borrow++;
      if (fs_borrow && fs_a != fs_b) n_fs_borrow_gen++;
      if (fs_borrow && fs_a == fs_b) n_fs_borrow_prop++;
      if (pg_a & pg_b) n_pg_and++;
      if (tr_a & ~tr_b) n_tr_andn++;
    end

    // ---------------- part 2: single stuck-at faults ---------------------
    `TB_STUCK_AT(dut.u_hs.b_copy,     hs_fault, n_hs_det, {hs_a, hs_b}, 2)
    `TB_STUCK_AT(dut.u_hs.a_xor_b,    hs_fault, n_hs_det, {hs_a, hs_b}, 2)
    `TB_STUCK_AT(dut.u_fs.b_copy,     fs_fault, n_fs_det, {fs_a, fs_b, fs_c}, 3)
    `TB_STUCK_AT(dut.u_fs.a_xor_b,    fs_fault, n_fs_det, {fs_a, fs_b, fs_c}, 3)
    `TB_STUCK_AT(dut.u_fs.c_copy0,    fs_fault, n_fs_det, {fs_a, fs_b, fs_c}, 3)
    `TB_STUCK_AT(dut.u_fs.c_copy1,    fs_fault, n_fs_det, {fs_a, fs_b, fs_c}, 3)
    `TB_STUCK_AT(dut.u_fs.a_xor_b_fw, fs_fault, n_fs_det, {fs_a, fs_b, fs_c}, 3)
    `TB_STUCK_AT(dut.u_pg.a_copy,     pg_fault, n_pg_det, {pg_a, pg_b, pg_c}, 3)
    `TB_STUCK_AT(dut.u_pg.na_b,       pg_fault, n_pg_det, {pg_a, pg_b, pg_c}, 3)
    `TB_STUCK_AT(dut.u_pg.a_and_b,    pg_fault, n_pg_det, {pg_a, pg_b, pg_c}, 3)
    `TB_STUCK_AT(dut.u_pg.b_rebuilt,  pg_fault, n_pg_det, {pg_a, pg_b, pg_c}, 3)
    `TB_STUCK_AT(dut.u_tr.b_copy,     tr_fault, n_tr_det, {tr_a, tr_b, tr_c}, 3)
    `TB_STUCK_AT(dut.u_tr.a_and_nb,   tr_fault, n_tr_det, {tr_a, tr_b, tr_c}, 3)
    `TB_STUCK_AT(dut.u_tr.a_and_b,    tr_fault, n_tr_det, {tr_a, tr_b, tr_c}, 3)
    `TB_STUCK_AT(dut.u_tr.a_rebuilt,  tr_fault, n_tr_det, {tr_a, tr_b, tr_c}, 3)

    $display("mechanisms: hs_borrow=%0d fs_borrow_generated=%0d fs_borrow_propagated=%0d",
             n_hs_borrow, n_fs_borrow_gen, n_fs_borrow_prop);
    $display("            peres_AB_term=%0d tr_ABn_term=%0d", n_pg_and, n_tr_andn);
    $display("            faults detected: hs=%0d fs=%0d pg=%0d tr=%0d",
             n_hs_det, n_fs_det, n_pg_det, n_tr_det);
    check(n_hs_borrow > 0, "half-subtractor borrow never happened");
    check(n_fs_borrow_gen > 0, "full-subtractor generated borrow never happened");
    check(n_fs_borrow_prop > 0, "full-subtractor propagated borrow never happened");
    check(n_pg_and > 0, "Peres AB term never active");
    check(n_tr_andn > 0, "TR AB' term never active");
    // Each line is flipped by exactly one of its two stuck values per pattern.
    check(n_hs_det == 2 * 4, "half-subtractor fault detections");
    check(n_fs_det == 5 * 8, "full-subtractor fault detections");
    check(n_pg_det == 4 * 8, "Peres fault detections");
    check(n_tr_det == 4 * 8, "TR fault detections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
