// tb_hamming_sbp_top: end-to-end test of the encode - channel - decode path
// with every parameter at its default (selective bit placement on).
//
// For random data blocks it applies, through the error-injection port:
//   - no error                         : data must come back, flag high
//   - one error in each wire slot      : outer correction, data back, flag high
//   - a double error in every pair of  : 9 of the 11 pairs per word must be
//     neighbouring slots of one word     detected (flag low); the other 2 must
//                                        be repaired by the inner code, so
//                                        none passes silently
//   - random double errors anywhere    : compared with the reference chain
//   - one error in every word at once  : all four corrected
// Every result is also compared with the reference decoder chain.  The
// mechanisms the design has (outer correction, outer detection of a syndrome
// above 12, inner correction, inner double-error detection, flag dropped)
// are counted, and one that never happened counts as a failure.
module tb_hamming_sbp_top;
  import hamming_ref_pkg::*;

  logic [4:1]  data     [1:4];
  logic [12:1] err_mask [1:4];
  logic [7:0]  code     [1:4];
  logic [4:1]  int_data [1:4];
  logic [12:1] tx       [1:4];
  logic [7:0]  dec_out  [1:4];
  logic [4:1]  org_data [1:4];
  logic        flag;
  logic [4:1]  outer_corrected, outer_detected, inner_corrected, inner_detected;

  int checks = 0, failures = 0;
  int n_outer_cor = 0, n_outer_det = 0, n_inner_cor = 0, n_inner_det = 0, n_flag_low = 0;
  int adj_total = 0, adj_detected = 0, adj_recovered = 0;

  hamming_sbp_top dut (
    .data(data), .err_mask(err_mask), .code(code), .int_data(int_data), .tx(tx),
    .dec_out(dec_out), .org_data(org_data), .flag(flag),
    .outer_corrected(outer_corrected), .outer_detected(outer_detected),
    .inner_corrected(inner_corrected), .inner_detected(inner_detected));

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply a block and an error pattern, compare with the reference chain.
  // must_recover: the data have to come back intact with the flag high.
  task automatic run(logic [15:0] m, logic [47:0] e, bit must_recover, string what);
    logic [47:0] w;
    logic [31:0] d8;
    logic [15:0] d4;
    int od, id, oc, ic;
    {data[1], data[2], data[3], data[4]} = m;
    {err_mask[1], err_mask[2], err_mask[3], err_mask[4]} = e;
    #1;
    w = ref_block_enc(1'b1, m);
    expect_eq(64'({tx[1], tx[2], tx[3], tx[4]}), 64'(w), {what, ": tx"});
    ref_block_dec(1'b1, w ^ e, d8, d4, od, id, oc, ic);
    expect_eq(64'({dec_out[1], dec_out[2], dec_out[3], dec_out[4]}), 64'(d8), {what, ": dec_out"});
    expect_eq(64'({org_data[1], org_data[2], org_data[3], org_data[4]}), 64'(d4), {what, ": org_data"});
    expect_eq(64'(flag), 64'(od == 0 && id == 0), {what, ": flag"});
    expect_eq(64'($countones(outer_corrected)), 64'(oc), {what, ": outer corrections"});
    expect_eq(64'($countones(outer_detected)),  64'(od), {what, ": outer detections"});
    expect_eq(64'($countones(inner_corrected)), 64'(ic), {what, ": inner corrections"});
    expect_eq(64'($countones(inner_detected)),  64'(id), {what, ": inner detections"});
    if (must_recover) begin
      expect_eq(64'({org_data[1], org_data[2], org_data[3], org_data[4]}), 64'(m), {what, ": recovered"});
      expect_eq(64'(flag), 64'(1), {what, ": flag high"});
    end
    n_outer_cor += $countones(outer_corrected);
    n_outer_det += $countones(outer_detected);
    n_inner_cor += $countones(inner_corrected);
    n_inner_det += $countones(inner_detected);
    n_flag_low  += int'(!flag);
  endtask

  function automatic logic [47:0] in_word(int k, logic [11:0] pat);
    return 48'(pat) << (12 * (3 - k));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int i, j;
    for (int t = 0; t < 200; t++) begin
      m = 16'($urandom);
      run(m, '0, 1'b1, "clean");
      for (int k = 0; k < 4; k++) begin
        for (int b = 0; b < 12; b++)
          run(m, in_word(k, 12'b1 << b), 1'b1, "single");
        for (int b = 0; b < 11; b++) begin
          run(m, in_word(k, 12'b11 << b), 1'b0, "adjacent double");
          adj_total++;
          adj_detected += int'(outer_detected[k+1]);
          // never silent: either flagged or the data come back intact
          checks++;
          if (flag && {org_data[1], org_data[2], org_data[3], org_data[4]} !== m) begin
            failures++;
            $display("FAIL adjacent double error in word %0d slots %0d,%0d passed silently",
                     k + 1, 12 - b - 1, 12 - b);
          end
          else if (flag) adj_recovered++;
        end
        i = int'($urandom_range(0, 11));
        j = (i + 1 + int'($urandom_range(0, 10))) % 12;
        run(m, in_word(k, (12'b1 << i) | (12'b1 << j)), 1'b0, "random double");
      end
      run(m, in_word(0, 12'b1 << $urandom_range(0, 11)) | in_word(1, 12'b1 << $urandom_range(0, 11)) |
             in_word(2, 12'b1 << $urandom_range(0, 11)) | in_word(3, 12'b1 << $urandom_range(0, 11)),
          1'b1, "one error per word");
    end
    checks++;
    if (adj_detected * 11 != adj_total * 9) begin
      failures++;
      $display("FAIL adjacent double errors detected %0d of %0d, expected 9 of 11",
               adj_detected, adj_total);
    end
    checks++;
    if (adj_recovered * 11 != adj_total * 2) begin
      failures++;
      $display("FAIL adjacent double errors repaired %0d of %0d, expected 2 of 11",
               adj_recovered, adj_total);
    end
    $display("adjacent double errors detected: %0d, repaired by the inner code: %0d, of %0d",
             adj_detected, adj_recovered, adj_total);
    $display("mechanisms: outer corrected %0d, outer detected %0d, inner corrected %0d, inner detected %0d, flag low %0d",
             n_outer_cor, n_outer_det, n_inner_cor, n_inner_det, n_flag_low);
    checks += 5;
    if (n_outer_cor == 0) begin failures++; $display("FAIL no outer correction"); end
    if (n_outer_det == 0) begin failures++; $display("FAIL no outer detection"); end
    if (n_inner_cor == 0) begin failures++; $display("FAIL no inner correction"); end
    if (n_inner_det == 0) begin failures++; $display("FAIL no inner detection"); end
    if (n_flag_low == 0)  begin failures++; $display("FAIL flag never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
