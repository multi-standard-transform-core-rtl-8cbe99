// tb_csda_sbf: checks the selected butterfly against sums and differences of
// random inputs, in butterfly mode and in bypass mode.
module tb_csda_sbf;
  logic signed [8:0] x [8];
  logic              four_pt;
  logic signed [9:0] a [4];
  logic signed [9:0] b [4];
  int checks = 0, failures = 0;

  csda_sbf #(.IN_W(9)) dut (.x(x), .four_pt(four_pt), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      four_pt = it[0];
      for (int i = 0; i < 8; i++) x[i] = 9'($urandom_range(0, 511));
      if (it == 2) foreach (x[i]) x[i] = -9'sd256;
      if (it == 4) foreach (x[i]) x[i] = 9'sd255;
      #1;
      for (int i = 0; i < 4; i++) begin
        automatic int ea = four_pt ? int'(x[i]) : int'(x[i]) + int'(x[7-i]);
        automatic int eb = four_pt ? int'(x[7-i]) : int'(x[i]) - int'(x[7-i]);
        checks += 2;
        if (int'(a[i]) != ea) begin failures++; $display("a%0d %0d exp %0d", i, a[i], ea); end
        if (int'(b[i]) != eb) begin failures++; $display("b%0d %0d exp %0d", i, b[i], eb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
