// tb_aes_lin_layer: applies random state shares and round-key shares to the
// per-share linear layer and compares with ShiftRows, MixColumns (or not) and
// AddRoundKey from the reference model followed by the tower-field map; the
// map itself is checked by undoing it with the inverse map X2A.
module tb_aes_lin_layer;
  import aes_dom_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t sb, key, st;
  logic mix;

  aes_lin_layer dut (.sb_i(sb), .key_i(key), .mix_i(mix), .st_o(st));

  initial begin
    for (int k = 0; k < 400; k++) begin
      logic [127:0] exp_v, got;
      sb  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      mix = k[0];
      #1;
      exp_v = shift_rows(sb);
      if (mix) exp_v = mix_columns(exp_v);
      exp_v ^= key;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) got = setb(got, r, c, inv_lin_map(st[c][r]));
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 5) $display("mismatch mix=%0b got %h exp %h", mix, got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
