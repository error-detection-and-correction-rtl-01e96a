// tb_mbc_encoder: checks the encoder against the reference equations for
// walking-one words, all-zero/all-one words and random words, and checks the
// check bits that the code's worked examples say a corrupted D0, {D0,D3},
// {D0,D1,D2} and {D0..D3} disturb.
module tb_mbc_encoder;
  import mbc_ref_pkg::*;

  logic [31:0] data;
  logic [45:0] code;
  int checks = 0, failures = 0;

  mbc_encoder dut (.data_i(data), .code_o(code));

  task automatic check_word(logic [31:0] d);
    data = d;
    #1;
    checks++;
    if (code !== ref_encode(d)) begin
      failures++;
      $display("FAIL data=%h code=%h expected=%h", d, code, ref_encode(d));
    end
  endtask

  // Check bits that flip when the bits in 'flips' are corrupted: {M9..M0,V3..V0}.
  task automatic check_example(logic [31:0] flips, logic [13:0] expected, string name);
    logic [13:0] base;
    data = 32'h0;
    #1 base = code[45:32];
    data = flips;
    #1;
    checks++;
    if ((code[45:32] ^ base) !== expected) begin
      failures++;
      $display("FAIL example %s: disturbed=%b expected=%b", name, code[45:32] ^ base, expected);
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
    check_word(32'h0);
    check_word(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) check_word(32'h1 << i);
    for (int i = 0; i < 500; i++) check_word($urandom);
    //                     M9..M0      V3..V0
    check_example(32'h1, {10'b01_0000_0001, 4'b0001}, "D0");            // M0 V0 M8
    check_example(32'h9, {10'b11_0000_0011, 4'b1001}, "D0,D3");         // M0 M1 V0 V3 M8 M9
    check_example(32'h7, {10'b01_0000_0011, 4'b0111}, "D0,D1,D2");      // M0 M1 V0-V2 M8
    check_example(32'hF, {10'b11_0000_0001, 4'b1111}, "D0..D3");        // M0 V0-V3 M8 M9
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
