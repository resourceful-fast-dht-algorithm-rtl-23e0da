// tb_lut_const_mul: checks the table-lookup constant multiplier (4-bit slices) for the
// seven twiddle magnitudes cos(2 pi j/32) * 2^16 (j = 1..7) and for the
// edge constants 0, 1, 2^16 and 0x15555, with 4-bit and 5-bit slices. Operands: the extremes of the 23-bit range and
// random values. Reference: round(x*C/2^16) worked out with 64-bit integers,
// wrapped to W bits like the block's output.
module tb_lut_const_mul;

  localparam int W = 23, CW = 16, NC = 11;
  localparam int COEFS [NC] = '{64277, 60547, 54491, 46341, 36410, 25080, 12785,
                                0, 1, 65536, 'h15555};

  logic signed [W-1:0] x;
  logic signed [W-1:0] p [NC];
  logic signed [W-1:0] p5 [NC];   // 5-bit slices: the top slice is 3 bits
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    lut_const_mul #(.W(W), .CW(CW), .COEF(COEFS[i]), .LB(4)) u_dut (.x, .p(p[i]));
    lut_const_mul #(.W(W), .CW(CW), .COEF(COEFS[i]), .LB(5)) u_dut5 (.x, .p(p5[i]));
  end

  function automatic longint ref_mul(longint xv, longint c);
    longint r;
    logic signed [W-1:0] rw;
    r  = (xv * c + (longint'(1) << (CW - 1))) >>> CW;
    rw = W'(r);                 // the block keeps W bits
    return longint'(rw);
  endfunction

  initial begin
    #100000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: x = '0;
        1: x = 1;
        2: x = -1;
        3: x = {1'b0, {(W-1){1'b1}}};
        4: x = {1'b1, {(W-1){1'b0}}} + 1;
        default: x = W'($urandom);
      endcase
      // keep |x*C| within W bits when C = 2^16
      if (x == {1'b1, {(W-1){1'b0}}}) x = x + 1;
      #1;
      for (int i = 0; i < NC; i++) begin
        longint r;
        r = ref_mul(longint'(x), longint'(COEFS[i]));
        checks++;
        checks++;
        if (longint'(p5[i]) != r) begin
          failures++;
          if (failures < 10) $display("ERROR: LB=5 x=%0d C=%0d p=%0d expected %0d", x, COEFS[i], p5[i], r);
        end
        if (longint'(p[i]) != r) begin
          failures++;
          if (failures < 10) $display("ERROR: x=%0d C=%0d p=%0d expected %0d", x, COEFS[i], p[i], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
