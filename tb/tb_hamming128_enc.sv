// tb_hamming128_enc: checks the (12,8) encoder in both bit orders.
// All 256 data words are compared with the reference model.  With the plain
// order, the four words of the published encoder waveform are fixed vectors.
// For every code word, each of the 11 double errors in neighbouring wire
// slots is applied and its syndrome worked out: with the selective order 9 of
// them must exceed 12, with the plain order only 1.
module tb_hamming128_enc;
  import hamming_ref_pkg::*;

  logic [7:0]  data;
  logic [12:1] code_sbp, code_plain;
  int checks = 0, failures = 0;
  int adj_sbp = 0, adj_plain = 0;

  hamming128_enc #(.SBP(1'b1)) dut_sbp   (.data(data), .code(code_sbp));
  hamming128_enc #(.SBP(1'b0)) dut_plain (.data(data), .code(code_plain));

  function automatic int adjacent_detected(bit sbp, logic [11:0] cw);
    logic [11:0] w;
    int n, s;
    n = 0;
    for (int k = 0; k < 11; k++) begin
      w = ref_from_wire(sbp, cw ^ (12'b11 << k));
      s = 0;
      for (int p = 1; p <= 12; p++) if (w[p-1]) s ^= p;
      if (s > 12) n++;
    end
    return n;
  endfunction

  task automatic check(logic [11:0] got, logic [11:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: data=%b code=%b expected %b", what, data, got, exp);
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
    for (int v = 0; v < 256; v++) begin
      data = 8'(v); #1;
      check(code_sbp,   ref_h128_enc(1'b1, 8'(v)), "selective order");
      check(code_plain, ref_h128_enc(1'b0, 8'(v)), "plain order");
      checks++;
      if (adjacent_detected(1'b1, code_sbp) != 9) begin
        failures++;
        $display("FAIL selective order detects %0d adjacent pairs",
                 adjacent_detected(1'b1, code_sbp));
      end
      checks++;
      if (adjacent_detected(1'b0, code_plain) != 1) begin
        failures++;
        $display("FAIL plain order detects %0d adjacent pairs",
                 adjacent_detected(1'b0, code_plain));
      end
      adj_sbp   += adjacent_detected(1'b1, code_sbp);
      adj_plain += adjacent_detected(1'b0, code_plain);
    end
    data = 8'b10101101; #1; check(code_plain, 12'b011001011101, "waveform tx1");
    data = 8'b01001010; #1; check(code_plain, 12'b110110001010, "waveform tx2");
    data = 8'b11110001; #1; check(code_plain, 12'b111011110001, "waveform tx3");
    data = 8'b00010101; #1; check(code_plain, 12'b100000100101, "waveform tx4");
    $display("adjacent double errors detected: selective %0d, plain %0d of %0d",
             adj_sbp, adj_plain, 256 * 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
