// tb_bch_ssfc: checks the sharing syndrome factor calculator.
//
// Random syndromes (with S1 = 0 and S1^3 = S3 included) are presented with a
// channel tag; one cycle later A, B, C, R, S1 and S1^2 must match the
// reference model's field arithmetic and the tag must follow. When in_valid
// is low the result register must hold its last value.
module tb_bch_ssfc;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [3:0] in_idx = '0;
  syn_t syn = '0;
  logic out_valid;
  logic [3:0] out_idx;
  ssf_t ssf;

  always #1 clk = ~clk;

  bch_ssfc #(.IDXW(4)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int s1, s3, s5, es1sq, ea, eb, ec, er;
    ssf_t last;
    tb_init();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      s1 = int'($urandom_range(1023, 0));
      s3 = int'($urandom_range(1023, 0));
      s5 = int'($urandom_range(1023, 0));
      if (n % 7 == 0) s1 = 0;
      if (n % 7 == 1) s3 = tmul(s1, tmul(s1, s1));
      syn.s1 = gf_t'(s1); syn.s3 = gf_t'(s3); syn.s5 = gf_t'(s5);
      in_valid = 1'b1;
      in_idx = 4'(n);
      @(negedge clk);
      tb_ssf(s1, s3, s5, es1sq, ea, eb, ec, er);
      checks++;
      if (!out_valid || out_idx != 4'(n) || int'(ssf.s1) != s1 || int'(ssf.s1sq) != es1sq ||
          int'(ssf.a) != ea || int'(ssf.b) != eb || int'(ssf.c) != ec || int'(ssf.r) != er) begin
        failures++;
        if (failures < 10)
          $display("n=%0d S=%h %h %h: got a=%h b=%h c=%h r=%h expected %h %h %h %h", n,
                   s1, s3, s5, ssf.a, ssf.b, ssf.c, ssf.r, ea, eb, ec, er);
      end
      if (n % 10 == 9) begin
        last = ssf;
        in_valid = 1'b0;
        syn = syn_t'({$urandom, $urandom});
        repeat (2) @(negedge clk);
        checks++;
        if (out_valid || ssf != last) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
