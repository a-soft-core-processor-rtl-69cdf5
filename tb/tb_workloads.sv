// tb_workloads: the reduction workloads for the three irreducible
// polynomials x^283 + x^12 + x^7 + x^5 + 1, x^241 + x^70 + 1 and
// x^163 + x^7 + x^6 + x^3 + 1, each on a range of accelerator word sizes
// from 32 bits up to 294 bits, including the conventional 32/64/128/256 and
// the unconventional sizes equal to or just above the field degree. Every
// configuration is elaborated with its own shift constants and memory
// width; results are checked against a bit-serial reference and the cycle
// counts are printed.
module tb_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 13;
  logic fin [N];
  int   ck [N], fl [N], cy [N];

  tb_soc_run #(.W(32),  .M(283), .A(12), .B(7), .C(5)) r0  (.clk, .finished(fin[0]),  .checks(ck[0]),  .failures(fl[0]),  .cycles(cy[0]));
  tb_soc_run #(.W(64),  .M(283), .A(12), .B(7), .C(5)) r1  (.clk, .finished(fin[1]),  .checks(ck[1]),  .failures(fl[1]),  .cycles(cy[1]));
  tb_soc_run #(.W(128), .M(283), .A(12), .B(7), .C(5)) r2  (.clk, .finished(fin[2]),  .checks(ck[2]),  .failures(fl[2]),  .cycles(cy[2]));
  tb_soc_run #(.W(256), .M(283), .A(12), .B(7), .C(5)) r3  (.clk, .finished(fin[3]),  .checks(ck[3]),  .failures(fl[3]),  .cycles(cy[3]));
  tb_soc_run #(.W(283), .M(283), .A(12), .B(7), .C(5)) r4  (.clk, .finished(fin[4]),  .checks(ck[4]),  .failures(fl[4]),  .cycles(cy[4]));
  tb_soc_run #(.W(32),  .M(241), .A(70), .B(0), .C(0)) r5  (.clk, .finished(fin[5]),  .checks(ck[5]),  .failures(fl[5]),  .cycles(cy[5]));
  tb_soc_run #(.W(128), .M(241), .A(70), .B(0), .C(0)) r6  (.clk, .finished(fin[6]),  .checks(ck[6]),  .failures(fl[6]),  .cycles(cy[6]));
  tb_soc_run #(.W(241), .M(241), .A(70), .B(0), .C(0)) r7  (.clk, .finished(fin[7]),  .checks(ck[7]),  .failures(fl[7]),  .cycles(cy[7]));
  tb_soc_run #(.W(256), .M(241), .A(70), .B(0), .C(0)) r8  (.clk, .finished(fin[8]),  .checks(ck[8]),  .failures(fl[8]),  .cycles(cy[8]));
  tb_soc_run #(.W(32),  .M(163), .A(7), .B(6), .C(3))  r9  (.clk, .finished(fin[9]),  .checks(ck[9]),  .failures(fl[9]),  .cycles(cy[9]));
  tb_soc_run #(.W(128), .M(163), .A(7), .B(6), .C(3))  r10 (.clk, .finished(fin[10]), .checks(ck[10]), .failures(fl[10]), .cycles(cy[10]));
  tb_soc_run #(.W(163), .M(163), .A(7), .B(6), .C(3))  r11 (.clk, .finished(fin[11]), .checks(ck[11]), .failures(fl[11]), .cycles(cy[11]));
  tb_soc_run #(.W(294), .M(163), .A(7), .B(6), .C(3))  r12 (.clk, .finished(fin[12]), .checks(ck[12]), .failures(fl[12]), .cycles(cy[12]));

  initial begin
    int checks, failures;
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= fin[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    // a word as wide as the field needs fewer cycles than 32-bit words
    checks += 3;
    if (!(cy[4] < cy[0]))  failures++;
    if (!(cy[7] < cy[5]))  failures++;
    if (!(cy[11] < cy[9])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
