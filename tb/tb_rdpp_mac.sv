// tb_rdpp_mac: self-checking test of the multiplier/accumulator. The
// expected value is formed with 64-bit integer arithmetic: the signed
// product of the upper 16-bit halves of A and B, plus C, D and the carry,
// reduced to 32 bits. Also checks D subtraction via one's complement + carry.
module tb_rdpp_mac;
  localparam int unsigned W = 32;
  logic clk = 0;
  logic [W-1:0] a, b, c, d, y;
  logic cin;
  int checks = 0, failures = 0;

  rdpp_mac #(.W(W)) dut (.a, .b, .c, .d, .cin, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(logic [W-1:0] a_, b_, c_, d_, logic ci);
    longint pa, pb, s;
    pa = longint'($signed(a_[31:16]));
    pb = longint'($signed(b_[31:16]));
    s  = pa * pb + longint'(c_) + longint'(d_) + longint'(ci);
    return s[W-1:0];
  endfunction

  initial begin
    // fixed cases: 0.5 * 0.5 = 0.25 as a 2/0/30 product (0x1000_0000)
    a = 32'h4000_0000; b = 32'h4000_0000; c = 0; d = 0; cin = 0;
    @(posedge clk); checks++;
    if (y !== 32'h1000_0000) begin failures++; $display("FAIL 0.5*0.5 y=%h", y); end
    // -0.5 * 0.5
    a = 32'hC000_0000; b = 32'h4000_0000;
    @(posedge clk); checks++;
    if (y !== 32'hF000_0000) begin failures++; $display("FAIL -0.5*0.5 y=%h", y); end
    // c - d with product zero: 100 - 30
    a = 0; b = 0; c = 100; d = ~32'd30; cin = 1;
    @(posedge clk); checks++;
    if (y !== 32'd70) begin failures++; $display("FAIL 100-30 y=%0d", y); end
    for (int t = 0; t < 1000; t++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; cin = 1'($urandom);
      @(posedge clk);
      checks++;
      if (y !== model(a, b, c, d, cin)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h cin=%b y=%h exp=%h", a, b, c, d, cin, y, model(a, b, c, d, cin));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
