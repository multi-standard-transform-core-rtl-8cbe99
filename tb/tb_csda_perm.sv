// tb_csda_perm: checks the output ordering of the permutation block for the
// 8-point (interleaved) and 4-point (grouped) modes.
module tb_csda_perm;
  logic               four_pt;
  logic signed [11:0] ze [4];
  logic signed [11:0] zo [4];
  logic signed [11:0] t  [8];
  int checks = 0, failures = 0;

  csda_perm #(.W(12)) dut (.four_pt(four_pt), .ze(ze), .zo(zo), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      four_pt = it[0];
      for (int i = 0; i < 4; i++) begin
        ze[i] = 12'($urandom);
        zo[i] = 12'($urandom);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (four_pt) begin
          if (t[i] !== ze[i] || t[4+i] !== zo[i]) failures++;
        end else begin
          if (t[2*i] !== ze[i] || t[2*i+1] !== zo[i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
