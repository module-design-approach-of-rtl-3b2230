// tb_ihc_encoder: checks the improved Hamming code encoder.
// Default size (10 data bits, 16-bit word): the worked example 10'b1100110011
// must give 16'b0000111100110011, and every 10-bit word is compared with a
// reference built from the coverage lists. A second instance with 7 data bits
// and no overall parity is checked against its own 11-bit reference. The
// one-cycle latency and the hold of enc_out while den is low are checked too.
module tb_ihc_encoder;
  logic clk = 0, rst = 1, den = 0;
  logic [9:0]  d16;
  logic [15:0] q16;
  logic        v16;
  logic [6:0]  d11;
  logic [10:0] q11;
  logic        v11;
  int checks = 0, failures = 0;

  ihc_encoder dut16 (.clk(clk), .rst(rst), .den(den), .enc_in(d16), .enc_out(q16), .enc_valid(v16));
  ihc_encoder #(.DATA_W(7), .EXTENDED(1'b0)) dut11 (.clk(clk), .rst(rst), .den(den), .enc_in(d11), .enc_out(q11), .enc_valid(v11));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref16(logic [9:0] d);
    logic [5:0] p;
    p[0] = d[0] ^ d[2] ^ d[4] ^ d[6] ^ d[8];
    p[1] = d[1] ^ d[2] ^ d[5] ^ d[6] ^ d[9];
    p[2] = d[3] ^ d[4] ^ d[5] ^ d[6];
    p[3] = d[7] ^ d[8] ^ d[9];
    p[4] = ^p[3:0];
    p[5] = ^{p[4:0], d};
    return {p, d};
  endfunction

  function automatic logic [10:0] ref11(logic [6:0] d);
    logic [3:0] p;
    p[0] = d[0] ^ d[2] ^ d[4] ^ d[6];
    p[1] = d[1] ^ d[2] ^ d[5] ^ d[6];
    p[2] = d[3] ^ d[4] ^ d[5] ^ d[6];
    p[3] = ^p[2:0];
    return {p, d};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d16 = '0; d11 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // worked example
    d16 <= 10'b1100110011; den <= 1;
    @(posedge clk);
    den <= 0;
    #1;
    check(v16 && q16 === 16'b0000111100110011, $sformatf("example q=%b", q16));
    @(posedge clk); #1;
    check(!v16 && q16 === 16'b0000111100110011, "hold while den low");
    for (int v = 0; v < 1024; v++) begin
      @(negedge clk);
      d16 = 10'(v); d11 = 7'(v); den = 1;
      @(posedge clk); #1;
      check(v16 && q16 === ref16(10'(v)), $sformatf("d=%b q=%b exp=%b", 10'(v), q16, ref16(10'(v))));
      check(v11 && q11 === ref11(7'(v)), $sformatf("d11=%b q=%b exp=%b", 7'(v), q11, ref11(7'(v))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
