// tb_mbc_codec_top: end-to-end test of the protected memory at its default
// size (256 words). Every address is written with a random word and read
// back clean; then each address receives an upset (a single cell, an
// adjacent run of 2 to 4 cells in one matrix row, a non-adjacent row pattern
// or a check-bit cell), is read, and is rewritten. Read data and flags are
// compared with a reference model, and rd_valid must rise exactly one cycle
// after rd_en. Counted mechanisms, each of which must occur: clean reads that
// bypass correction, corrected single-bit upsets, corrected multi-bit row
// upsets, detected but uncorrectable upsets, check-bit upsets, and rewrites
// that clear an upset.
module tb_mbc_codec_top;
  import mbc_pkg::*;
  import mbc_ref_pkg::*;

  localparam int DEPTH = 256;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, upset_addr = '0;
  data_t wr_data = '0;
  codeword_t upset_mask = '0;
  logic rd_valid, rd_err, rd_corrected, rd_uncorrectable;
  data_t rd_data;
  syndrome_t rd_syndrome;

  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;
  logic [45:0] examples [4] = '{46'h1, 46'h9, 46'h7, 46'hF};
  int n_clean = 0, n_single = 0, n_multi = 0, n_unc = 0, n_chk = 0, n_scrub = 0;

  mbc_codec_top dut (.*);

  always #5 clk = ~clk;

  task automatic write(int a, logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    shadow[a] = d;
  endtask

  task automatic upset(int a, logic [45:0] m);
    @(negedge clk);
    upset_en = 1'b1; upset_addr = AW'(a); upset_mask = m;
    @(negedge clk);
    upset_en = 1'b0;
  endtask

  // Read address a; the stored codeword is expected to be the clean one XOR m.
  task automatic read_check(int a, logic [45:0] m, bit fixable);
    logic [45:0] stored;
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(a);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL rd_valid early"); end
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (!rd_valid) begin failures++; $display("FAIL rd_valid not one cycle after rd_en"); end
    stored = ref_encode(shadow[a]) ^ m;
    checks++;
    if (rd_syndrome !== (ref_check(stored[31:0]) ^ stored[45:32])) begin
      failures++; $display("FAIL syndrome a=%0d", a);
    end
    checks++;
    if (m == '0) begin
      if (rd_data !== shadow[a] || rd_err || rd_corrected || rd_uncorrectable) begin
        failures++; $display("FAIL clean read a=%0d", a);
      end
    end else if (fixable) begin
      if (rd_data !== shadow[a] || !rd_err || !rd_corrected || rd_uncorrectable) begin
        failures++; $display("FAIL correction a=%0d mask=%h", a, m);
      end
    end else begin
      if (rd_data !== stored[31:0] || !rd_err || rd_corrected || !rd_uncorrectable) begin
        failures++; $display("FAIL detection a=%0d mask=%h", a, m);
      end
    end
    if (m == '0 && !rd_err) n_clean++;
    if (fixable && rd_corrected && $countones(m) == 1) n_single++;
    if (fixable && rd_corrected && $countones(m) > 1) n_multi++;
    if (!fixable && rd_uncorrectable) n_unc++;
    @(negedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL rd_valid held"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) write(a, $urandom);
    for (int a = 0; a < DEPTH; a++) read_check(a, '0, 1'b0);
    for (int a = 0; a < DEPTH; a++) begin
      int r, kind, len;
      logic [3:0] pat;
      logic [45:0] m;
      bit fixable;
      r = $urandom_range(7);
      kind = a % 4;
      case (kind)
        0: pat = 4'b0001 << $urandom_range(3);                           // single cell
        1: begin                                                         // adjacent run
             len = $urandom_range(4, 2);
             pat = 4'((1 << len) - 1) << $urandom_range(4 - len);
           end
        2: pat = (a % 8 == 2) ? 4'b0101 : 4'b1010;                       // non-adjacent
        default: pat = 4'b0000;
      endcase
      if (kind == 3) begin
        m = 46'h1 << $urandom_range(45, 32);                             // check-bit cell
        fixable = 1'b0;
        n_chk++;
      end else begin
        m = 46'(pat) << (4*r);
        fixable = ref_correctable(r, pat);
      end
      upset(a, m);
      read_check(a, m, fixable);
      write(a, shadow[a]);
      read_check(a, '0, 1'b0);
      n_scrub++;
    end
    // the code's worked examples: D0, {D0,D3}, {D0,D1,D2}, {D0..D3}
    foreach (examples[i]) begin
      upset(0, examples[i]);
      read_check(0, examples[i], 1'b1);
      write(0, shadow[0]);
    end
    $display("mechanisms: clean=%0d single=%0d multi=%0d uncorrectable=%0d checkbit=%0d rewrite=%0d",
             n_clean, n_single, n_multi, n_unc, n_chk, n_scrub);
    checks++; if (n_clean  == 0) begin failures++; $display("FAIL no clean read"); end
    checks++; if (n_single == 0) begin failures++; $display("FAIL no single correction"); end
    checks++; if (n_multi  == 0) begin failures++; $display("FAIL no multi-bit correction"); end
    checks++; if (n_unc    == 0) begin failures++; $display("FAIL no uncorrectable detection"); end
    checks++; if (n_chk    == 0) begin failures++; $display("FAIL no check-bit upset"); end
    checks++; if (n_scrub  == 0) begin failures++; $display("FAIL no rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
