// tb_ecc_dec: checks the (13,8) classic Hamming SEC-DED decoder.
// The waveform example d_i = 13'b1000100100010 must give q_o = 8'b10000010,
// syndrome_o = 0 and no flags one cycle later. For all 256 data words (coded
// by a hand-written reference) the clean word, all 13 single flips and a set
// of double flips are applied; clkena_i low must hold the outputs.
module tb_ecc_dec;
  logic clk = 0, rst_n = 0, ena = 0;
  logic [12:0] d;
  logic [7:0]  q;
  logic [4:0]  syn;
  logic        sb, db, fix;
  int checks = 0, failures = 0;

  ecc_dec dut (.clk_i(clk), .rst_ni(rst_n), .clkena_i(ena), .d_i(d), .q_o(q),
    .syndrome_o(syn), .sb_err_o(sb), .db_err_o(db), .sb_fix_o(fix));

  always #5 clk = ~clk;

  function automatic logic [12:0] ref_q(logic [7:0] x);
    logic p1, p2, p4, p8;
    logic [11:0] cw;
    p1 = x[0] ^ x[1] ^ x[3] ^ x[4] ^ x[6];
    p2 = x[0] ^ x[2] ^ x[3] ^ x[5] ^ x[6];
    p4 = x[1] ^ x[2] ^ x[3] ^ x[7];
    p8 = x[4] ^ x[5] ^ x[6] ^ x[7];
    cw = {x[7], x[6], x[5], x[4], p8, x[3], x[2], x[1], p4, x[0], p2, p1};
    return {cw, ^cw};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input logic [12:0] w);
    d = w; ena = 1;
    @(negedge clk);
    ena = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(13'b1000100100010);
    check(q === 8'b10000010 && syn === 5'b00000 && !sb && !db && !fix, "example");
    d = 13'h1FFF;
    @(negedge clk);
    check(q === 8'b10000010 && syn === 5'b00000, "hold while clkena low");
    for (int v = 0; v < 256; v++) begin
      logic [12:0] c;
      c = ref_q(8'(v));
      apply(c);
      check(q === 8'(v) && syn == 0 && !sb && !db && !fix, "clean");
      for (int i = 0; i < 13; i++) begin
        apply(c ^ (13'd1 << i));
        check(q === 8'(v) && sb && !db, $sformatf("single d=%0d bit=%0d q=%b", v, i, q));
        check(fix == (i != 0) && syn === {4'(i), 1'b1}, $sformatf("single syndrome bit=%0d syn=%b", i, syn));
      end
      if (v % 17 == 0)
        for (int i = 0; i < 13; i++)
          for (int j = i + 1; j < 13; j++) begin
            apply(c ^ (13'd1 << i) ^ (13'd1 << j));
            check(db && !sb && !fix, $sformatf("double d=%0d bits=%0d,%0d", v, i, j));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
