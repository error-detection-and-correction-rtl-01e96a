// tb_mbc_memory: checks the codeword array against a shadow copy kept in the
// testbench: write then read back every address, one-cycle read latency,
// read-during-write returning the old word, upsets flipping stored bits, and
// a write to the upset address in the same cycle winning over the upset.
module tb_mbc_memory;
  localparam int DEPTH = 16;
  localparam int WIDTH = 46;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, upset_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, upset_mask = '0, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  mbc_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic write(int a, logic [WIDTH-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    shadow[a] = d;
  endtask

  task automatic read_check(int a);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(a);
    @(posedge clk);
    #1 rd_en = 1'b0;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL read a=%0d got=%h expected=%h", a, rd_data, shadow[a]);
    end
  endtask

  task automatic upset(int a, logic [WIDTH-1:0] m);
    @(negedge clk);
    upset_en = 1'b1; upset_addr = AW'(a); upset_mask = m;
    @(negedge clk);
    upset_en = 1'b0;
    shadow[a] ^= m;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] d;
    for (int a = 0; a < DEPTH; a++) write(a, {$urandom, $urandom});
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // latency: data present one edge after rd_en, not before
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(3);
    @(posedge clk);
    #1 rd_en = 1'b0;
    checks++;
    if (rd_data !== shadow[3]) begin failures++; $display("FAIL latency"); end
    // read during write returns the old word
    @(negedge clk);
    d = {$urandom, $urandom};
    wr_en = 1'b1; wr_addr = AW'(5); wr_data = d;
    rd_en = 1'b1; rd_addr = AW'(5);
    @(posedge clk);
    #1 wr_en = 1'b0; rd_en = 1'b0;
    checks++;
    if (rd_data !== shadow[5]) begin failures++; $display("FAIL read-during-write"); end
    shadow[5] = d;
    read_check(5);
    // upsets
    for (int i = 0; i < 40; i++) begin
      int a;
      a = $urandom_range(DEPTH-1);
      upset(a, (46'hF) << $urandom_range(42));
      read_check(a);
    end
    // write and upset on the same address: write wins
    @(negedge clk);
    d = {$urandom, $urandom};
    wr_en = 1'b1; wr_addr = AW'(7); wr_data = d;
    upset_en = 1'b1; upset_addr = AW'(7); upset_mask = '1;
    @(negedge clk);
    wr_en = 1'b0; upset_en = 1'b0;
    shadow[7] = d;
    read_check(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
