// tb_ihc_decoder: checks the registered improved Hamming decoder.
// Random data words are coded by a reference encoder, zero, one or two bits
// are flipped, and one cycle after dec_in_valid the corrected data, status
// and flags must match. Covers the 16-bit default and the 11-bit link code.
module tb_ihc_decoder;
  logic clk = 0, rst = 1, vin = 0;
  logic [15:0] cw16;
  logic [9:0]  q16;
  logic [5:0]  st16;
  logic        v16, cor16, unc16;
  logic [10:0] cw11;
  logic [6:0]  q11;
  logic [3:0]  st11;
  logic        v11, cor11, unc11;
  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0;

  ihc_decoder dut16 (.clk(clk), .rst(rst), .dec_in_valid(vin), .dec_in(cw16), .dec_out(q16),
    .dec_valid(v16), .status(st16), .corrected(cor16), .uncorrectable(unc16));
  ihc_decoder #(.DATA_W(7), .EXTENDED(1'b0)) dut11 (.clk(clk), .rst(rst), .dec_in_valid(vin),
    .dec_in(cw11), .dec_out(q11), .dec_valid(v11), .status(st11), .corrected(cor11),
    .uncorrectable(unc11));

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw16 = '0; cw11 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // worked example, bit 2 flipped
    @(negedge clk);
    cw16 = 16'b0000111100110111; vin = 1;
    @(negedge clk);
    vin = 0;
    check(v16 && st16 === 6'b100011 && q16 === 10'b1100110011 && cor16, "example");
    @(negedge clk);
    check(!v16 && q16 === 10'b1100110011, "hold");
    for (int n = 0; n < 3000; n++) begin
      logic [9:0] d;
      logic [6:0] d7;
      int kind, i, j, i7;
      d = 10'($urandom); d7 = 7'($urandom);
      kind = n % 3;
      i = $urandom_range(15); j = (i + 1 + $urandom_range(14)) % 16;
      i7 = $urandom_range(10);
      cw16 = ref16(d);
      cw11 = ref11(d7);
      if (kind >= 1) begin cw16[i] = ~cw16[i]; cw11[i7] = ~cw11[i7]; end
      if (kind == 2) cw16[j] = ~cw16[j];
      vin = 1;
      @(negedge clk);
      check(v16 && v11, "valid after one cycle");
      case (kind)
        0: begin
          n_clean++;
          check(st16 == 0 && !cor16 && !unc16 && q16 === d, "clean");
          check(st11 == 0 && !cor11 && !unc11 && q11 === d7, "clean 11");
        end
        1: begin
          n_single++;
          check(cor16 && !unc16 && q16 === d, $sformatf("single bit %0d", i));
          check(cor11 && !unc11 && q11 === d7, $sformatf("single11 bit %0d", i7));
        end
        default: begin
          n_double++;
          check(unc16 && !cor16 && st16[5] == 1'b0, $sformatf("double %0d %0d", i, j));
          check(cor11 && !unc11 && q11 === d7, "single11");
        end
      endcase
    end
    vin = 0;
    check(n_clean > 0 && n_single > 0 && n_double > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
