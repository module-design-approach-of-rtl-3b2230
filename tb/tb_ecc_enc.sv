// tb_ecc_enc: checks the (13,8) classic Hamming SEC-DED encoder.
// The waveform example d_i = 8'b10000010 must give p_o = 4'b1001, p0_o = 0,
// q_o = 13'b1000100100010; all 256 inputs are compared with a reference that
// writes out the check equations by hand (p1: positions 3,5,7,9,11;
// p2: 3,6,7,10,11; p4: 5,6,7,12; p8: 9,10,11,12).
module tb_ecc_enc;
  logic [7:0]  d;
  logic [12:0] q;
  logic [3:0]  p;
  logic        p0;
  int checks = 0, failures = 0;

  ecc_enc dut (.d_i(d), .q_o(q), .p_o(p), .p0_o(p0));

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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'b10000010; #1;
    check(p === 4'b1001 && p0 === 1'b0 && q === 13'b1000100100010, $sformatf("example q=%b p=%b", q, p));
    for (int v = 0; v < 256; v++) begin
      d = 8'(v); #1;
      check(q === ref_q(d), $sformatf("d=%b q=%b exp=%b", d, q, ref_q(d)));
      check(p === {q[8], q[4], q[2], q[1]} && p0 === q[0], "p_o and p0_o");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
