// tb_parity_checker: self-check of the parity fault detector.
//
// Drives random input and output vectors into two checkers, one at the
// default widths (3 and 3) and one at the widths used for the full
// subtractor (7 and 7), and compares `error` with a reference that counts
// the ones in both vectors: the error flag must be set exactly when that
// total is odd. It also checks that flipping any single output bit of a
// parity-matched pair raises the flag.
module tb_parity_checker;

  logic [2:0] in3, out3;
  logic [6:0] in7, out7;
  logic       err3, err7;
  int         checks = 0, failures = 0;
  int         errors_seen = 0;

  parity_checker dut (.in_vec(in3), .out_vec(out3), .error(err3));
  parity_checker #(.IN_WIDTH(7), .OUT_WIDTH(7)) dut7 (.in_vec(in7), .out_vec(out7), .error(err7));

  function automatic bit odd_ones(input logic [13:0] v);
    int n = 0;
    for (int i = 0; i < 14; i++) if (v[i]) n++;
    return n % 2 == 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {in3, out3} = 6'(i);
      in7  = 7'($urandom);
      out7 = 7'($urandom);
      #1;
      check(err3 == odd_ones({8'b0, in3, out3}), $sformatf("3/3 in=%b out=%b", in3, out3));
      check(err7 == odd_ones({in7, out7}), $sformatf("7/7 in=%b out=%b", in7, out7));
      if (err3) errors_seen++;
    end
    // A matched pair (output copies input) flagged only after one bit flips.
    for (int k = 0; k < 7; k++) begin
      in7  = 7'($urandom);
      out7 = in7;
      #1;
      check(err7 == 1'b0, "matched parity flagged");
      out7[k] = ~out7[k];
      #1;
      check(err7 == 1'b1, $sformatf("single flip of bit %0d not flagged", k));
    end
    check(errors_seen == 32, "3/3 checker did not flag exactly half of all patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
