// tb_secded84_enc: checks the (8,4) SEC-DED encoder.
// All 16 data words are compared with the reference model; the four row code
// words of the published encoder waveform are checked as fixed vectors.
module tb_secded84_enc;
  import hamming_ref_pkg::*;

  logic [4:1] d;
  logic [7:0] code;
  int checks = 0, failures = 0;

  secded84_enc dut (.d(d), .code(code));

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s: d=%b code=%b expected %b", what, d, code, exp);
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
    for (int v = 0; v < 16; v++) begin
      d = 4'(v); #1;
      check(ref_secded_enc(4'(v)), "exhaustive");
    end
    d = 4'b1010; #1; check(8'b10110100, "waveform word 1");
    d = 4'b1100; #1; check(8'b01111000, "waveform word 2");
    d = 4'b1001; #1; check(8'b00110011, "waveform word 3");
    d = 4'b0100; #1; check(8'b10011001, "waveform word 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
