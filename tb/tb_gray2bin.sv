// tb_gray2bin: exhaustive check of gray2bin at 10 and 9 bits against the
// defining relation gray = bin ^ (bin >> 1), applied in the encoding direction.
module tb_gray2bin;
  int checks = 0, failures = 0;
  logic [9:0] g10, b10;
  logic [8:0] g9, b9;
  gray2bin #(.W(10)) dut10 (.gray(g10), .bin(b10));
  gray2bin #(.W(9))  dut9  (.gray(g9),  .bin(b9));
  initial begin
    for (int v = 0; v < 1024; v++) begin
      g10 = 10'(v) ^ (10'(v) >> 1);
      g9  = 9'(v)  ^ (9'(v)  >> 1);
      #1;
      checks++; if (b10 != 10'(v)) begin failures++; $display("W10 v=%0d got %0d", v, b10); end
      if (v < 512) begin checks++; if (b9 != 9'(v)) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
