// tb_fec_encoder: self-checking test of the convolutional encoder bank at
// rate 1/2 (K=7, 171/133), rate 1/3 (K=4, 13/15/17) and uncoded.
module tb_fec_encoder;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d2, d3, d1;
  int   c2, c3, c1, f2, f3, f1;

  enc_check #(.N(4), .FORMAT(4), .CODE(2)) u_r12 (.clk, .done(d2), .checks(c2), .failures(f2));
  enc_check #(.N(4), .FORMAT(6), .CODE(3)) u_r13 (.clk, .done(d3), .checks(c3), .failures(f3));
  enc_check #(.N(2), .FORMAT(4), .CODE(1)) u_unc (.clk, .done(d1), .checks(c1), .failures(f1));

  initial begin
    repeat (2) @(posedge clk);   // let the checkers clear their outputs
    wait (d2 && d3 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c1, f2 + f3 + f1);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_fec_encoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c1, f2 + f3 + f1 + 1);
    $finish;
  end
endmodule
