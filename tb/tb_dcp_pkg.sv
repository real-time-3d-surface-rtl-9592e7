// tb_dcp_pkg: checks the shared word formats. The classification word built
// by make_class is compared with the hexadecimal values of the class table
// (sign of H in bits 9:8, sign of K in bits 1:0, everything else zero), and
// the range word and range vector layouts are checked bit by bit: Z, Y, X
// at bits 29:20, 19:10 and 9:0 with the valid flag at bit 30, and sample 0
// of a vector in its most significant word.
module tb_dcp_pkg;
  import dcp_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sign2_t       codes [3];
    logic [31:0]  word;
    range_word_t  r;
    rvec_t        v;
    logic [255:0] flat;
    codes = '{SIGN_ZERO, SIGN_POS, SIGN_NEG};
    // Class table entries.
    expect32("plane",   make_class(SIGN_ZERO, SIGN_ZERO), 32'h0000_0000);
    expect32("valley",  make_class(SIGN_POS,  SIGN_ZERO), 32'h0000_0100);
    expect32("ridge",   make_class(SIGN_NEG,  SIGN_ZERO), 32'h0000_0300);
    expect32("pit",     make_class(SIGN_POS,  SIGN_POS),  32'h0000_0101);
    expect32("peak",    make_class(SIGN_NEG,  SIGN_POS),  32'h0000_0301);
    expect32("saddle",  make_class(SIGN_ZERO, SIGN_NEG),  32'h0000_0003);
    // Every combination of the two signs.
    foreach (codes[i]) foreach (codes[j]) begin
      word = make_class(codes[i], codes[j]);
      expect32("class", word, {22'd0, codes[i], 6'd0, codes[j]});
    end
    // Range word fields.
    for (int k = 0; k < 200; k++) begin
      word = $urandom;
      r = word;
      expect32("z", 32'(r.z), 32'(word[29:20]));
      expect32("y", 32'(r.y), 32'(word[19:10]));
      expect32("x", 32'(r.x), 32'(word[9:0]));
      expect32("valid", 32'(r.valid), 32'(word[30]));
      expect32("empty", 32'(r.empty), 32'(word[31]));
    end
    // Range vector lane order.
    for (int k = 0; k < 8; k++) v[k] = range_word_t'(32'h1000_0000 + k);
    flat = v;
    for (int k = 0; k < 8; k++)
      expect32("lane", flat[255-32*k -: 32], 32'h1000_0000 + k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
