// pp_subtractor_top: the four parity-preserving reversible circuits side by
// side, each watched by a parity checker.
//
// The circuits are independent and share only the gate library (Feynman
// double gate and Fredkin gate):
//   hs_*   half subtractor     A - B          (2 gates, cost 7)
//   fs_*   full subtractor     A - B - C      (4 gates, cost 11)
//   pg_*   Peres gate          A, A^B, AB^C   (3 gates, cost 9)
//   tr_*   TR gate             A, A^B, AB'^C  (3 gates, cost 9)
// Every circuit's garbage lines are brought out next to its useful outputs,
// because a reversible circuit's outputs are the complete output vector.
// For each circuit a parity_checker compares the parity of the complete input
// vector (data inputs plus the constant zeros, which add nothing) with that of
// the complete output vector; *_fault goes to 1 when they differ, which in a
// fault-free circuit never happens and which any single flipped line inside
// the cascade causes. The four circuits are the published ones; placing them
// in one top and adding a checker per circuit is this design's choice.
// Purely combinational: every output follows its inputs with gate delay only.
module pp_subtractor_top (
  // half subtractor
  input  logic       hs_a,
  input  logic       hs_b,
  output logic       hs_diff,
  output logic       hs_borrow,
  output logic [1:0] hs_garbage,
  output logic       hs_fault,
  // full subtractor
  input  logic       fs_a,
  input  logic       fs_b,
  input  logic       fs_c,
  output logic       fs_diff,
  output logic       fs_borrow,
  output logic [4:0] fs_garbage,
  output logic       fs_fault,
  // parity-preserving Peres gate
  input  logic       pg_a,
  input  logic       pg_b,
  input  logic       pg_c,
  output logic       pg_p,
  output logic       pg_q,
  output logic       pg_r,
  output logic [1:0] pg_garbage,
  output logic       pg_fault,
  // parity-preserving TR gate
  input  logic       tr_a,
  input  logic       tr_b,
  input  logic       tr_c,
  output logic       tr_p,
  output logic       tr_q,
  output logic       tr_r,
  output logic [1:0] tr_garbage,
  output logic       tr_fault
);

  // ---------------- half subtractor: 2 data + 2 constant inputs ----------
  pp_half_subtractor u_hs (
    .a       (hs_a),
    .b       (hs_b),
    .diff    (hs_diff),
    .borrow  (hs_borrow),
    .garbage (hs_garbage)
  );

  parity_checker #(.IN_WIDTH(4), .OUT_WIDTH(4)) u_hs_chk (
    .in_vec  ({hs_a, hs_b, 2'b00}),
    .out_vec ({hs_diff, hs_borrow, hs_garbage}),
    .error   (hs_fault)
  );

  // ---------------- full subtractor: 3 data + 4 constant inputs ----------
  pp_full_subtractor u_fs (
    .a       (fs_a),
    .b       (fs_b),
    .c       (fs_c),
    .diff    (fs_diff),
    .borrow  (fs_borrow),
    .garbage (fs_garbage)
  );

  parity_checker #(.IN_WIDTH(7), .OUT_WIDTH(7)) u_fs_chk (
    .in_vec  ({fs_a, fs_b, fs_c, 4'b0000}),
    .out_vec ({fs_diff, fs_borrow, fs_garbage}),
    .error   (fs_fault)
  );

  // ---------------- Peres gate: 3 data + 2 constant inputs ---------------
  pp_peres_gate u_pg (
    .a       (pg_a),
    .b       (pg_b),
    .c       (pg_c),
    .p       (pg_p),
    .q       (pg_q),
    .r       (pg_r),
    .garbage (pg_garbage)
  );

  parity_checker #(.IN_WIDTH(5), .OUT_WIDTH(5)) u_pg_chk (
    .in_vec  ({pg_a, pg_b, pg_c, 2'b00}),
    .out_vec ({pg_p, pg_q, pg_r, pg_garbage}),
    .error   (pg_fault)
  );

  // ---------------- TR gate: 3 data + 2 constant inputs ------------------
  pp_tr_gate u_tr (
    .a       (tr_a),
    .b       (tr_b),
    .c       (tr_c),
    .p       (tr_p),
    .q       (tr_q),
    .r       (tr_r),
    .garbage (tr_garbage)
  );

  parity_checker #(.IN_WIDTH(5), .OUT_WIDTH(5)) u_tr_chk (
    .in_vec  ({tr_a, tr_b, tr_c, 2'b00}),
    .out_vec ({tr_p, tr_q, tr_r, tr_garbage}),
    .error   (tr_fault)
  );

endmodule
