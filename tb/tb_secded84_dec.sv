// tb_secded84_dec: checks the (8,4) SEC-DED decoder.
// Every data word is sent clean, with each of the 8 single errors and with
// each of the 28 double errors.  Data and status are compared with a
// nearest-code-word search; the syndrome of a single error in c1..c7 must
// name its position.
module tb_secded84_dec;
  import hamming_ref_pkg::*;

  logic [7:0] code;
  logic [4:1] d;
  logic [2:0] syndrome;
  logic       single_err, double_err;
  int checks = 0, failures = 0;

  secded84_dec dut (.code(code), .d(d), .syndrome(syndrome),
                    .single_err(single_err), .double_err(double_err));

  task automatic apply(logic [7:0] word, string what);
    logic [3:0] ed;
    int kind;
    code = word; #1;
    ref_secded_dec(word, ed, kind);
    checks++;
    if (single_err !== (kind == 1) || double_err !== (kind == 2) ||
        (kind != 2 && d !== ed)) begin
      failures++;
      $display("FAIL %s: code=%b d=%b s=%b dbl=%b ref d=%b kind=%0d",
               what, word, d, single_err, double_err, ed, kind);
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
    logic [7:0] cw;
    for (int v = 0; v < 16; v++) begin
      cw = ref_secded_enc(4'(v));
      apply(cw, "clean");
      for (int i = 0; i < 8; i++) begin
        apply(cw ^ (8'b1 << i), "single");
        if (i >= 1) begin  // bit i is position 8-i
          checks++;
          if (syndrome !== 3'(8 - i)) begin
            failures++;
            $display("FAIL syndrome %b for error at c%0d", syndrome, 8 - i);
          end
        end
        for (int j = i + 1; j < 8; j++)
          apply(cw ^ (8'b1 << i) ^ (8'b1 << j), "double");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
