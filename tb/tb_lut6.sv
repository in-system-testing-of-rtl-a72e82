// tb_lut6: exhaustive check of the LUT model. For random contents every
// address is applied; O6 must equal bit a of the contents and O5 bit a[4:0].
module tb_lut6;
  logic [63:0] init;
  logic [5:0]  a;
  logic        o6, o5;
  int checks = 0, failures = 0;

  lut6 dut (.init, .a, .o6, .o5);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      init = {$urandom, $urandom};
      if (t == 0) init = 64'h0123_4567_89AB_CDEF;
      for (int i = 0; i < 64; i++) begin
        a = 6'(i);
        #1;
        checks++;
        if (o6 !== ((init >> i) & 64'd1) || o5 !== ((init >> (i % 32)) & 64'd1)) begin
          failures++;
          $display("mismatch init=%h a=%0d o6=%b o5=%b", init, i, o6, o5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
