// ksa_adder_tb: Kogge-Stone adder against integer addition.
//
// Three instances: the 8-bit adder, a 5-bit one (not a power of two, so the
// top row completes inside the network and needs no carry-out cell) and a
// 16-bit one (four levels).
//   - 8 bits: every a, b, cin with all rows powered: {cout, sum} = a + b + cin.
//   - All sizes: random operands with a random set of rows switched off and
//     the operand bits of those rows forced to 0. Isolation must then be
//     invisible: the result is still a + b + cin.
//   - All sizes: every row off. Every signal leaving the rows is clamped to 0,
//     so only the always-on sum XOR of bit 0 sees a non-zero input:
//     sum = cin, cout = 0.
module ksa_adder_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8, on8;
  logic [4:0]  a5, b5, s5, on5;
  logic [15:0] a16, b16, s16, on16;
  logic        cin, co8, co5, co16;

  ksa_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .row_on(on8),  .sum(s8),  .cout(co8));
  ksa_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .cin(cin), .row_on(on5),  .sum(s5),  .cout(co5));
  ksa_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin), .row_on(on16), .sum(s16), .cout(co16));

  task automatic check(string tag, int n, longint unsigned exp, longint unsigned got);
    checks++;
    if (exp != got) begin
      failures++;
      if (failures < 20) $display("FAIL %s N=%0d exp=%h got=%h", tag, n, exp, got);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive 8-bit, all rows powered.
    on8 = '1; on5 = '1; on16 = '1;
    a5 = '0; b5 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a8, b8} = 17'(v);
      #1;
      check("full8", 8, longint'(a8) + longint'(b8) + longint'(cin), {co8, s8});
    end

    // Random operands, random rows off with their operand bits zeroed.
    for (int n = 0; n < 20000; n++) begin
      cin  = 1'($urandom);
      on8  = 8'($urandom);  a8  = 8'($urandom)  & on8;  b8  = 8'($urandom)  & on8;
      on5  = 5'($urandom);  a5  = 5'($urandom)  & on5;  b5  = 5'($urandom)  & on5;
      on16 = 16'($urandom); a16 = 16'($urandom) & on16; b16 = 16'($urandom) & on16;
      #1;
      check("gated8",  8,  longint'(a8)  + longint'(b8)  + longint'(cin), {co8, s8});
      check("gated5",  5,  longint'(a5)  + longint'(b5)  + longint'(cin), {co5, s5});
      check("gated16", 16, longint'(a16) + longint'(b16) + longint'(cin), {co16, s16});
    end

    // Random operands on all-ones rows for the 5- and 16-bit adders.
    on5 = '1; on16 = '1;
    for (int n = 0; n < 20000; n++) begin
      cin = 1'($urandom);
      a5  = 5'($urandom);  b5  = 5'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (n == 0) begin a16 = '1; b16 = '0; cin = 1'b1; end  // full carry ripple
      #1;
      check("full5",  5,  longint'(a5)  + longint'(b5)  + longint'(cin), {co5, s5});
      check("full16", 16, longint'(a16) + longint'(b16) + longint'(cin), {co16, s16});
    end

    // Every row off: only the clamp values remain.
    on8 = '0; on5 = '0; on16 = '0;
    for (int n = 0; n < 2000; n++) begin
      cin = 1'($urandom);
      a8  = 8'($urandom);  b8  = 8'($urandom);
      a5  = 5'($urandom);  b5  = 5'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      check("off8",  8,  longint'(cin), {co8, s8});
      check("off5",  5,  longint'(cin), {co5, s5});
      check("off16", 16, longint'(cin), {co16, s16});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
