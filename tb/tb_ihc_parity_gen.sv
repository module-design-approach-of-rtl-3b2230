// tb_ihc_parity_gen: checks the position parities of the improved Hamming code.
// Exhaustive over all 1024 words of 10 bits, against parities computed from the
// explicit coverage lists (P0: positions 1,3,5,7,9; P1: 2,3,6,7,10; P2: 4,5,6,7;
// P3: 8,9,10), plus the worked example 10'b1100110011 -> P[3:0] = 4'b0011.
module tb_ihc_parity_gen;
  logic [9:0] data;
  logic [3:0] pos_par;
  int checks = 0, failures = 0;

  ihc_parity_gen #(.DATA_W(10)) dut (.data(data), .pos_par(pos_par));

  // data position k is data[k-1]
  function automatic logic [3:0] ref_par(logic [9:0] d);
    logic [3:0] p;
    p[0] = d[0] ^ d[2] ^ d[4] ^ d[6] ^ d[8];
    p[1] = d[1] ^ d[2] ^ d[5] ^ d[6] ^ d[9];
    p[2] = d[3] ^ d[4] ^ d[5] ^ d[6];
    p[3] = d[7] ^ d[8] ^ d[9];
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 10'b1100110011;
    #1;
    checks++;
    if (pos_par !== 4'b0011) begin
      failures++;
      $display("FAIL example: P=%b", pos_par);
    end
    for (int v = 0; v < 1024; v++) begin
      data = 10'(v);
      #1;
      checks++;
      if (pos_par !== ref_par(data)) begin
        failures++;
        if (failures < 10) $display("FAIL data=%b P=%b exp=%b", data, pos_par, ref_par(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
