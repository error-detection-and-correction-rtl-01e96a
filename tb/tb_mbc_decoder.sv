// tb_mbc_decoder: feeds the decoder reference-encoded words with injected
// errors and checks data, syndrome and flags:
//  - no error: data unchanged, no flag;
//  - every single data-bit error (32 positions): corrected;
//  - every row (8) x every non-empty column pattern (15): corrected exactly
//    when the reference table says the pattern can be placed in that row,
//    otherwise flagged uncorrectable with the data left as stored;
//  - every single check-bit error: flagged uncorrectable, data unchanged;
//  - the code's worked examples D0, {D0,D3}, {D0,D1,D2}, {D0..D3}: corrected.
module tb_mbc_decoder;
  import mbc_ref_pkg::*;

  logic [45:0] code;
  logic [31:0] data_o;
  logic [13:0] syn;
  logic err, corr, unc;
  int checks = 0, failures = 0;

  mbc_decoder dut (
    .code_i(code), .data_o(data_o), .syndrome_o(syn),
    .err_o(err), .corrected_o(corr), .uncorrectable_o(unc)
  );

  task automatic expect_result(logic [31:0] d, logic [45:0] flips, bit fixable, string name);
    code = ref_encode(d) ^ flips;
    #1;
    checks++;
    if (syn !== (ref_check(code[31:0]) ^ code[45:32])) begin
      failures++;
      $display("FAIL %s: syndrome %b", name, syn);
    end
    checks++;
    if (flips == '0) begin
      if (data_o !== d || err || corr || unc) begin
        failures++;
        $display("FAIL %s: clean word d=%h out=%h flags=%b%b%b", name, d, data_o, err, corr, unc);
      end
    end else if (fixable) begin
      if (data_o !== d || !err || !corr || unc) begin
        failures++;
        $display("FAIL %s: not corrected d=%h out=%h flags=%b%b%b", name, d, data_o, err, corr, unc);
      end
    end else begin
      if (data_o !== code[31:0] || !err || corr || !unc) begin
        failures++;
        $display("FAIL %s: expected refusal d=%h out=%h flags=%b%b%b", name, d, data_o, err, corr, unc);
      end
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
    logic [31:0] d;
    for (int n = 0; n < 20; n++) begin
      d = (n == 0) ? 32'h0 : (n == 1) ? 32'hFFFF_FFFF : $urandom;
      expect_result(d, '0, 1'b0, "clean");
      for (int i = 0; i < 32; i++)
        expect_result(d, 46'h1 << i, 1'b1, "single");
      for (int r = 0; r < 8; r++)
        for (int p = 1; p < 16; p++)
          expect_result(d, 46'(p) << (4*r), ref_correctable(r, 4'(p)), $sformatf("row%0d pat%b", r, 4'(p)));
      for (int k = 32; k < 46; k++)
        expect_result(d, 46'h1 << k, 1'b0, "check bit");
      expect_result(d, 46'h1, 1'b1, "D0");
      expect_result(d, 46'h9, 1'b1, "D0,D3");
      expect_result(d, 46'h7, 1'b1, "D0,D1,D2");
      expect_result(d, 46'hF, 1'b1, "D0..D3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
