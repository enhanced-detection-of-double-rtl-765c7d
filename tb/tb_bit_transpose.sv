// tb_bit_transpose: checks the 4x4 bit transpose.
// The data words of the published encoder waveform must give its interleaved
// words; random blocks are compared with the reference and must come back
// unchanged after a second transpose.
module tb_bit_transpose;
  import hamming_ref_pkg::*;

  logic [4:1] a [1:4];
  logic [4:1] b [1:4];
  logic [4:1] c [1:4];
  int checks = 0, failures = 0;

  bit_transpose dut  (.in_w(a), .out_w(b));
  bit_transpose dut2 (.in_w(b), .out_w(c));

  function automatic logic [15:0] pack(logic [4:1] w [1:4]);
    return {w[1], w[2], w[3], w[4]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    a = '{4'b1010, 4'b1100, 4'b1001, 4'b0100}; #1;
    checks++;
    if (pack(b) !== {4'b1110, 4'b0101, 4'b1000, 4'b0010}) begin
      failures++;
      $display("FAIL waveform block: %h", pack(b));
    end
    for (int t = 0; t < 200; t++) begin
      m = 16'($urandom);
      {a[1], a[2], a[3], a[4]} = m; #1;
      checks++;
      if (pack(b) !== ref_transpose(m)) begin
        failures++;
        $display("FAIL transpose %h -> %h expected %h", m, pack(b), ref_transpose(m));
      end
      checks++;
      if (pack(c) !== m) begin
        failures++;
        $display("FAIL double transpose %h -> %h", m, pack(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
