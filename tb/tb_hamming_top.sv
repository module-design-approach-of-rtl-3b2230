// tb_hamming_top: end-to-end test of all three designs in hamming_top, at the
// default sizes (the top has no parameters).
//  * link: random 56-bit messages through noise (one flip per word) and
//    without noise; every message must arrive intact, 12 cycles after send.
//  * 16-bit improved code: the worked example and random words with no, one
//    or two flipped bits; singles corrected, doubles flagged.
//  * (13,8) classic code: the waveform example and random words with no flip,
//    a flip of a code word bit, of the overall parity bit, or two flips.
// Each mechanism (link correction of a data bit and of a check bit, clean
// link word, 16-bit correction, 16-bit double detection, 13-bit fix, 13-bit
// parity-only error, 13-bit double detection) is counted and must occur.
module tb_hamming_top;
  logic clk = 0, rst = 1;
  logic        sys_send = 0, sys_noise_en = 0;
  logic [55:0] sys_datain, sys_dataout;
  logic        sys_receive, sys_busy, sys_wvalid, sys_wcor, sys_wunc;
  logic [3:0]  sys_wst;
  logic        c16_valid = 0;
  logic [9:0]  c16_data, c16_dout;
  logic [15:0] c16_mask, c16_cw;
  logic        c16_vout, c16_cor, c16_unc;
  logic [5:0]  c16_st;
  logic        e13_ena = 0;
  logic [7:0]  e13_data, e13_q;
  logic [12:0] e13_mask, e13_cw;
  logic [4:0]  e13_syn;
  logic        e13_sb, e13_db, e13_fix;
  int checks = 0, failures = 0;
  int n_sys_data = 0, n_sys_check = 0, n_sys_clean = 0;
  int n_c16_single = 0, n_c16_double = 0, n_e13_fix = 0, n_e13_p0 = 0, n_e13_double = 0;

  hamming_top dut (
    .clk(clk), .rst(rst),
    .sys_send(sys_send), .sys_datain(sys_datain), .sys_noise_en(sys_noise_en),
    .sys_dataout(sys_dataout), .sys_receive(sys_receive), .sys_busy(sys_busy),
    .sys_word_valid(sys_wvalid), .sys_word_status(sys_wst),
    .sys_word_corrected(sys_wcor), .sys_word_uncorrectable(sys_wunc),
    .c16_valid(c16_valid), .c16_data(c16_data), .c16_err_mask(c16_mask),
    .c16_codeword(c16_cw), .c16_valid_out(c16_vout), .c16_data_out(c16_dout),
    .c16_status(c16_st), .c16_corrected(c16_cor), .c16_uncorrectable(c16_unc),
    .e13_clkena(e13_ena), .e13_data(e13_data), .e13_err_mask(e13_mask),
    .e13_codeword(e13_cw), .e13_q(e13_q), .e13_syndrome(e13_syn),
    .e13_sb_err(e13_sb), .e13_db_err(e13_db), .e13_sb_fix(e13_fix));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (!rst && sys_wvalid) begin
      if (sys_noise_en) begin
        check(sys_wcor && !sys_wunc, "link word not corrected");
        if (!sys_wst[3] && sys_wst[2:0] != 0) n_sys_data++;
        else n_sys_check++;
      end else begin
        check(!sys_wcor && !sys_wunc, "clean link word flagged");
        n_sys_clean++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // five-stage link
  initial begin : link
    sys_datain = '0;
    repeat (2) @(negedge clk);
    @(negedge clk);
    for (int m = 0; m < 30; m++) begin
      logic [55:0] x;
      int cyc;
      x = {$urandom, $urandom};
      sys_noise_en = (m % 3) != 2;
      sys_datain = x; sys_send = 1;
      @(negedge clk);
      sys_send = 0;
      cyc = 1;
      while (!sys_receive && cyc < 50) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc - 1 == 12 && sys_dataout === x, $sformatf("link msg %0d: %h exp %h after %0d", m, sys_dataout, x, cyc));
      @(negedge clk);
    end
  end

  // 16-bit improved code and (13,8) classic code, run alongside the link
  initial begin : codecs
    c16_data = '0; c16_mask = '0; e13_data = '0; e13_mask = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // worked example with bit 9 flipped
    c16_data = 10'b1100110011; c16_valid = 1;
    @(negedge clk);
    c16_valid = 0;
    check(c16_cw === 16'b0000111100110011, "c16 example code word");
    c16_mask = 16'd1 << 9;
    @(negedge clk);
    check(c16_vout && c16_st === 6'b101010 && c16_dout === 10'b1100110011 && c16_cor, "c16 example");
    // waveform example of the (13,8) code
    e13_data = 8'b10000010; e13_mask = '0; #1;
    check(e13_cw === 13'b1000100100010, "e13 example code word");
    e13_ena = 1;
    @(negedge clk);
    e13_ena = 0;
    check(e13_q === 8'b10000010 && e13_syn === 5'b0 && !e13_sb && !e13_db && !e13_fix, "e13 example");
    for (int n = 0; n < 600; n++) begin
      logic [9:0] d10;
      logic [7:0] d8;
      int k16, k13, i, j;
      d10 = 10'($urandom); d8 = 8'($urandom);
      k16 = n % 3; k13 = n % 4;
      c16_data = d10; c16_mask = '0; c16_valid = 1;
      @(negedge clk);
      c16_valid = 0;
      i = $urandom_range(15); j = (i + 1 + $urandom_range(14)) % 16;
      c16_mask = (k16 >= 1 ? 16'd1 << i : 16'd0) | (k16 == 2 ? 16'd1 << j : 16'd0);
      e13_data = d8;
      i = 1 + $urandom_range(11); j = (i + $urandom_range(11)) % 12 + 1;
      case (k13)
        0: e13_mask = '0;
        1: e13_mask = 13'd1 << i;
        2: e13_mask = 13'd1;
        default: e13_mask = (13'd1 << i) | (13'd1 << j);
      endcase
      if (k13 == 3 && i == j) e13_mask = 13'b11;
      e13_ena = 1;
      @(negedge clk);
      e13_ena = 0;
      check(c16_vout, "c16 valid");
      case (k16)
        0: check(!c16_cor && !c16_unc && c16_dout === d10, "c16 clean");
        1: begin
          check(c16_cor && !c16_unc && c16_dout === d10, "c16 single");
          n_c16_single++;
        end
        default: begin
          check(c16_unc && !c16_cor, "c16 double");
          n_c16_double++;
        end
      endcase
      case (k13)
        0: check(e13_q === d8 && !e13_sb && !e13_db && !e13_fix, "e13 clean");
        1: begin
          check(e13_q === d8 && e13_sb && e13_fix && !e13_db, "e13 single");
          n_e13_fix++;
        end
        2: begin
          check(e13_q === d8 && e13_sb && !e13_fix && !e13_db, "e13 parity bit");
          n_e13_p0++;
        end
        default: begin
          check(e13_db && !e13_sb && !e13_fix, "e13 double");
          n_e13_double++;
        end
      endcase
    end
    repeat (400) @(negedge clk);   // let the link finish
    check(n_sys_data > 0, "link data-bit correction seen");
    check(n_sys_check > 0, "link check-bit flip seen");
    check(n_sys_clean > 0, "link clean word seen");
    check(n_c16_single > 0 && n_c16_double > 0, "c16 single and double seen");
    check(n_e13_fix > 0 && n_e13_p0 > 0 && n_e13_double > 0, "e13 fix, parity-only and double seen");
    $display("link: data fixes %0d, check-bit fixes %0d, clean %0d", n_sys_data, n_sys_check, n_sys_clean);
    $display("c16: single %0d, double %0d; e13: fix %0d, parity-only %0d, double %0d",
             n_c16_single, n_c16_double, n_e13_fix, n_e13_p0, n_e13_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
