// tb_ihc_parity_check: checks the parity check / correction of the improved code.
// 16-bit default: the three received words of the worked example give status
// 000000, 100011 (bit 2 flipped) and 101010 (bit 9 flipped); for many data
// words every single flip must be corrected and every double flip flagged
// uncorrectable. An 11-bit instance (7 data bits, no overall parity) must
// correct every single flip of every word. Code words are built by an
// independent reference encoder in this file.
module tb_ihc_parity_check;
  logic [15:0] cw16;
  logic [5:0]  st16;
  logic [9:0]  q16;
  logic        det16, cor16, unc16;
  logic [10:0] cw11;
  logic [3:0]  st11;
  logic [6:0]  q11;
  logic        det11, cor11, unc11;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  ihc_parity_check dut16 (.cw_in(cw16), .status(st16), .data_out(q16),
    .err_detected(det16), .corrected(cor16), .uncorrectable(unc16));
  ihc_parity_check #(.DATA_W(7), .EXTENDED(1'b0)) dut11 (.cw_in(cw11), .status(st11),
    .data_out(q11), .err_detected(det11), .corrected(cor11), .uncorrectable(unc11));

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
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw11 = '0;
    // worked example
    cw16 = 16'b0000111100110011; #1;
    check(st16 === 6'b000000 && !det16 && !cor16 && !unc16 && q16 === 10'b1100110011, "example no error");
    cw16 = 16'b0000111100110111; #1;
    check(st16 === 6'b100011 && cor16 && !unc16 && q16 === 10'b1100110011, $sformatf("example bit 2: st=%b", st16));
    cw16 = 16'b0000110100110011; #1;
    check(st16 === 6'b101010 && cor16 && !unc16 && q16 === 10'b1100110011, $sformatf("example bit 9: st=%b", st16));
    cw16 = 16'b0000111000110011; #1;
    check(st16 === 6'b101001 && cor16 && q16 === 10'b1100110011, $sformatf("example bit 8: st=%b", st16));
    // all data words: clean, single and double flips
    for (int v = 0; v < 1024; v++) begin
      logic [15:0] c;
      c = ref16(10'(v));
      cw16 = c; #1;
      check(st16 == 0 && !cor16 && !unc16 && q16 === 10'(v), "clean 16");
      for (int i = 0; i < 16; i++) begin
        cw16 = c ^ (16'd1 << i); #1;
        n_single++;
        check(det16 && cor16 && !unc16 && q16 === 10'(v),
              $sformatf("single d=%0d bit=%0d st=%b q=%b", v, i, st16, q16));
        if (i < 10) check(st16 === {2'b10, 4'(i + 1)}, "status of data flip");
      end
      if (v % 37 == 0)
        for (int i = 0; i < 16; i++)
          for (int j = i + 1; j < 16; j++) begin
            cw16 = c ^ (16'd1 << i) ^ (16'd1 << j); #1;
            n_double++;
            check(det16 && unc16 && !cor16, $sformatf("double d=%0d bits=%0d,%0d", v, i, j));
          end
    end
    for (int v = 0; v < 128; v++) begin
      logic [10:0] c;
      c = ref11(7'(v));
      cw11 = c; #1;
      check(st11 == 0 && !cor11 && !unc11 && q11 === 7'(v), "clean 11");
      for (int i = 0; i < 11; i++) begin
        cw11 = c ^ (11'd1 << i); #1;
        check(det11 && cor11 && !unc11 && q11 === 7'(v),
              $sformatf("single11 d=%0d bit=%0d st=%b q=%b", v, i, st11, q11));
      end
    end
    check(n_single > 0 && n_double > 0, "error kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
