// tb_stage_logic: the stage function on random words, one and two inputs,
// against a 64-bit computation: product of the two 16-bit halves of the
// 32-bit sum of the inputs.
module tb_stage_logic;
  logic [0:0][31:0] din1;
  logic [1:0][31:0] din2;
  logic [31:0] dout1, dout2;
  int checks = 0, failures = 0;

  stage_logic #(.W(32), .NI(1)) u1 (.din(din1), .dout(dout1));
  stage_logic #(.W(32), .NI(2)) u2 (.din(din2), .dout(dout2));

  function automatic logic [31:0] model(longint unsigned s);
    longint unsigned a, hi, lo;
    a  = s % 64'h1_0000_0000;
    hi = a / 65536;
    lo = a % 65536;
    return 32'(hi * lo);
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      din1[0] = $urandom;
      din2[0] = $urandom;
      din2[1] = (i < 10) ? 32'hFFFF_FFFF : $urandom;
      #1;
      checks += 2;
      if (dout1 !== model(longint'(din1[0]))) failures++;
      if (dout2 !== model(longint'(din2[0]) + longint'(din2[1]))) failures++;
    end
    din1[0] = 32'hFFFF_FFFF; #1; checks++;
    if (dout1 !== 32'hFFFE_0001) failures++;
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
