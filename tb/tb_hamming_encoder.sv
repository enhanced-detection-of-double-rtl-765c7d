// tb_hamming_encoder: checks the block encoder in both bit orders.
// The published encoder waveform gives the row code words and the
// interleaved words for one block; random blocks are compared with the
// reference encoder (transpose, (8,4) SEC-DED, (12,8) code).
module tb_hamming_encoder;
  import hamming_ref_pkg::*;

  logic [4:1]  data [1:4];
  logic [7:0]  code_s [1:4], code_p [1:4];
  logic [4:1]  int_s  [1:4], int_p  [1:4];
  logic [12:1] tx_s   [1:4], tx_p   [1:4];
  int checks = 0, failures = 0;

  hamming_encoder #(.SBP(1'b1)) dut_s (.data(data), .code(code_s), .int_data(int_s), .tx(tx_s));
  hamming_encoder #(.SBP(1'b0)) dut_p (.data(data), .code(code_p), .int_data(int_p), .tx(tx_p));

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_block(logic [15:0] m);
    logic [15:0] t;
    t = ref_transpose(m);
    for (int k = 1; k <= 4; k++) begin
      expect_eq(64'(code_s[k]), 64'(ref_secded_enc(m[19-4*k -: 4])), "row code");
      expect_eq(64'(code_p[k]), 64'(code_s[k]), "row code, plain");
      expect_eq(64'(int_s[k]), 64'(t[19-4*k -: 4]), "interleave");
    end
    expect_eq(64'({tx_s[1], tx_s[2], tx_s[3], tx_s[4]}), 64'(ref_block_enc(1'b1, m)), "tx selective");
    expect_eq(64'({tx_p[1], tx_p[2], tx_p[3], tx_p[4]}), 64'(ref_block_enc(1'b0, m)), "tx plain");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    data = '{4'b1010, 4'b1100, 4'b1001, 4'b0100}; #1;
    expect_eq(64'({code_s[1], code_s[2], code_s[3], code_s[4]}),
              64'h B4_78_33_99, "waveform code_1..4");
    expect_eq(64'({int_s[1], int_s[2], int_s[3]}), 64'b1110_0101_1000, "waveform int_data1..3");
    check_block({4'b1010, 4'b1100, 4'b1001, 4'b0100});
    for (int t = 0; t < 300; t++) begin
      m = 16'($urandom);
      {data[1], data[2], data[3], data[4]} = m; #1;
      check_block(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
