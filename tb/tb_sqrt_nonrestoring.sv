// tb_sqrt_nonrestoring: self-checking test of the 62-bit nonrestoring square
// root. For zero, one, the largest radicand, perfect squares and their
// neighbours and random radicands it checks q*q <= d < (q+1)*(q+1) on 64-bit
// unsigned integers, which holds only for q = floor(sqrt(d)).
module tb_sqrt_nonrestoring;

  logic [61:0] d;
  logic [30:0] q;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sqrt_nonrestoring dut (.d(d), .q(q));

  task automatic check(input longint unsigned x);
    longint unsigned qq;
    d = 62'(x);
    @(posedge clk);
    qq = 64'(q);
    checks++;
    if (!(qq * qq <= 64'(d) && 64'(d) < (qq + 1) * (qq + 1)))
      begin failures++; $display("FAIL d=%0d got q=%0d", d, q); end
  endtask

  initial begin
    longint unsigned r;
    check(0); check(1); check(2); check(3); check(4);
    check((64'd1 << 62) - 1);
    check(64'd1 << 54);                 // 1.0 Wb^2 in [8.54]
    for (int n = 0; n < 300; n++) begin
      r = 64'($urandom) & 64'h7FFF_FFFF;
      check(r * r);
      if (r != 0) check(r * r - 1);
      check(r * r + 1);
    end
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom} >> 2);
    for (int n = 0; n < 500; n++) check(64'($urandom) >> $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
