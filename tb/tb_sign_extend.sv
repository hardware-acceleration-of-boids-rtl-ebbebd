// tb_sign_extend: checks sign extension for the default (28 to 32 bits) and
// the velocity width (21 to 32 bits) on random inputs.
module tb_sign_extend;
  logic [27:0] d28;
  logic [31:0] o28;
  logic [20:0] d21;
  logic [31:0] o21;
  int checks = 0, failures = 0;

  sign_extend dut28 (.din(d28), .dout(o28));
  sign_extend #(.IN_W(21), .OUT_W(32)) dut21 (.din(d21), .dout(o21));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int e28, e21;
      d28 = 28'($urandom);
      d21 = 21'($urandom);
      #1;
      e28 = int'(d28) - (d28[27] ? (1 << 28) : 0);
      e21 = int'(d21) - (d21[20] ? (1 << 21) : 0);
      checks += 2;
      if (int'(o28) != e28) begin failures++; $display("FAIL 28: %h -> %h", d28, o28); end
      if (int'(o21) != e21) begin failures++; $display("FAIL 21: %h -> %h", d21, o21); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
