// tb_hamming_decoder: checks the block decoder in both bit orders.
// The published decoder waveform (plain order) is applied in both of its
// phases: the four received words, then the same words with the last wire bit
// of each corrupted.  Both must give its dec_out and org_data values with the
// flag high.  Random blocks with random error patterns are then compared with
// the reference decoder chain.
module tb_hamming_decoder;
  import hamming_ref_pkg::*;

  logic [12:1] rx [1:4];
  logic [7:0]  dec_s [1:4], dec_p [1:4];
  logic [4:1]  org_s [1:4], org_p [1:4];
  logic        flag_s, flag_p;
  logic [4:1]  oc_s, od_s, ic_s, id_s, oc_p, od_p, ic_p, id_p;
  int checks = 0, failures = 0;

  hamming_decoder #(.SBP(1'b1)) dut_s (
    .data_dec_in(rx), .dec_out(dec_s), .org_data(org_s), .flag(flag_s),
    .outer_corrected(oc_s), .outer_detected(od_s),
    .inner_corrected(ic_s), .inner_detected(id_s));
  hamming_decoder #(.SBP(1'b0)) dut_p (
    .data_dec_in(rx), .dec_out(dec_p), .org_data(org_p), .flag(flag_p),
    .outer_corrected(oc_p), .outer_detected(od_p),
    .inner_corrected(ic_p), .inner_detected(id_p));

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_ref(bit sbp, logic [47:0] w);
    logic [31:0] d8;
    logic [15:0] d4;
    int od, id, oc, ic;
    ref_block_dec(sbp, w, d8, d4, od, id, oc, ic);
    if (sbp) begin
      expect_eq(64'({dec_s[1], dec_s[2], dec_s[3], dec_s[4]}), 64'(d8), "dec_out sel");
      expect_eq(64'({org_s[1], org_s[2], org_s[3], org_s[4]}), 64'(d4), "org_data sel");
      expect_eq(64'(flag_s), 64'(od == 0 && id == 0), "flag sel");
      expect_eq(64'($countones(od_s)), 64'(od), "outer detected sel");
      expect_eq(64'($countones(ic_s)), 64'(ic), "inner corrected sel");
    end else begin
      expect_eq(64'({dec_p[1], dec_p[2], dec_p[3], dec_p[4]}), 64'(d8), "dec_out plain");
      expect_eq(64'({org_p[1], org_p[2], org_p[3], org_p[4]}), 64'(d4), "org_data plain");
      expect_eq(64'(flag_p), 64'(od == 0 && id == 0), "flag plain");
      expect_eq(64'($countones(id_p)), 64'(id), "inner detected plain");
      expect_eq(64'($countones(oc_p)), 64'(oc), "outer corrected plain");
    end
  endtask

  function automatic logic [11:0] rand_err();
    int i, j;
    i = int'($urandom_range(0, 11));
    j = int'($urandom_range(0, 11));
    case ($urandom_range(0, 3))
      0: return '0;
      1: return 12'b1 << i;
      2: return (12'b1 << i) | (12'b1 << j);
      default: return (i < 11) ? (12'b11 << i) : 12'b11;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    logic [47:0] w;
    rx = '{12'b011001011101, 12'b110110001010, 12'b111011110001, 12'b100000100101}; #1;
    expect_eq(64'({dec_p[1], dec_p[2], dec_p[3], dec_p[4]}), 64'hAD_4A_F1_15, "waveform dec_out");
    expect_eq(64'({org_p[1], org_p[2], org_p[3], org_p[4]}), 64'hAC94, "waveform org_data");
    expect_eq(64'(flag_p), 64'(1), "waveform flag");
    rx = '{12'b011001011100, 12'b110110001011, 12'b111011110000, 12'b100000100100}; #1;
    expect_eq(64'({dec_p[1], dec_p[2], dec_p[3], dec_p[4]}), 64'hAD_4A_F1_15, "waveform dec_out, corrupted");
    expect_eq(64'({org_p[1], org_p[2], org_p[3], org_p[4]}), 64'hAC94, "waveform org_data, corrupted");
    expect_eq(64'(flag_p), 64'(1), "waveform flag, corrupted");
    expect_eq(64'(oc_p), 64'hF, "waveform outer corrections");
    for (int t = 0; t < 2000; t++) begin
      m = 16'($urandom);
      for (int sbp = 0; sbp < 2; sbp++) begin
        w = ref_block_enc(sbp[0], m);
        w ^= {rand_err(), rand_err(), rand_err(), rand_err()};
        {rx[1], rx[2], rx[3], rx[4]} = w; #1;
        check_ref(sbp[0], w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
