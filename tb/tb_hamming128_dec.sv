// tb_hamming128_dec: checks the (12,8) decoder in both bit orders.
// Every data word is sent clean, with each of the 12 single errors and with
// each of the 66 double errors.  Clean and single-error words must decode to
// the data sent; every word is compared with the reference decoder (data,
// syndrome, corrected, detected).  Double errors in neighbouring wire slots
// are counted: the selective order must detect 9 of the 11 per word, the
// plain order 1.  The four corrupted words of the published decoder waveform
// (plain order) must decode to its outputs.
module tb_hamming128_dec;
  import hamming_ref_pkg::*;

  logic [12:1] rx;
  logic [7:0]  d_sbp, d_plain;
  logic [3:0]  s_sbp, s_plain;
  logic        c_sbp, c_plain, e_sbp, e_plain;
  int checks = 0, failures = 0;
  int adj_sbp = 0, adj_plain = 0;

  hamming128_dec #(.SBP(1'b1)) dut_sbp (
    .code(rx), .data(d_sbp), .syndrome(s_sbp), .corrected(c_sbp), .detected(e_sbp));
  hamming128_dec #(.SBP(1'b0)) dut_plain (
    .code(rx), .data(d_plain), .syndrome(s_plain), .corrected(c_plain), .detected(e_plain));

  task automatic compare(bit sbp, logic [7:0] sent, int nerr, string what);
    logic [7:0] ed, gd;
    logic [3:0] gs;
    logic gc, ge;
    int kind, syn;
    ref_h128_dec(sbp, rx, ed, kind, syn);
    {gd, gs, gc, ge} = sbp ? {d_sbp, s_sbp, c_sbp, e_sbp}
                           : {d_plain, s_plain, c_plain, e_plain};
    checks++;
    if (gd !== ed || gs !== 4'(syn) || gc !== (kind == 1) || ge !== (kind == 2) ||
        (nerr < 2 && gd !== sent)) begin
      failures++;
      $display("FAIL %s sbp=%0d rx=%b: d=%b s=%0d c=%b e=%b, ref d=%b s=%0d kind=%0d",
               what, sbp, rx, gd, gs, gc, ge, ed, syn, kind);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] cw [2];
    for (int v = 0; v < 256; v++) begin
      cw[0] = ref_h128_enc(1'b0, 8'(v));
      cw[1] = ref_h128_enc(1'b1, 8'(v));
      for (int sbp = 0; sbp < 2; sbp++) begin
        rx = cw[sbp]; #1; compare(sbp[0], 8'(v), 0, "clean");
        for (int i = 0; i < 12; i++) begin
          rx = cw[sbp] ^ (12'b1 << i); #1; compare(sbp[0], 8'(v), 1, "single");
          for (int j = i + 1; j < 12; j++) begin
            rx = cw[sbp] ^ (12'b1 << i) ^ (12'b1 << j); #1;
            compare(sbp[0], 8'(v), 2, "double");
            if (j == i + 1) begin
              if (sbp == 1) adj_sbp += int'(e_sbp);
              else          adj_plain += int'(e_plain);
            end
          end
        end
      end
    end
    checks++;
    if (adj_sbp != 9 * 256 || adj_plain != 256) begin
      failures++;
      $display("FAIL adjacent detection: selective %0d plain %0d", adj_sbp, adj_plain);
    end
    $display("adjacent double errors detected: selective %0d, plain %0d of %0d",
             adj_sbp, adj_plain, 256 * 11);
    // published decoder waveform, plain order, last wire bit corrupted
    rx = 12'b011001011100; #1; checks++; if (d_plain !== 8'b10101101) failures++;
    rx = 12'b110110001011; #1; checks++; if (d_plain !== 8'b01001010) failures++;
    rx = 12'b111011110000; #1; checks++; if (d_plain !== 8'b11110001) failures++;
    rx = 12'b100000100100; #1; checks++; if (d_plain !== 8'b00010101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
