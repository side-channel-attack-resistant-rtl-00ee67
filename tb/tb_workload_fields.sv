// tb_workload_fields -- the field sizes and core counts of the evaluation.
//
// Runs the scalar multiplier over GF(2^131), GF(2^163), GF(2^193) and
// GF(2^233), each with 1, 2, 4 and 8 lanes (GF(2^131) on 4 lanes, the
// default, has its own full key sweep), all side by side. Each
// configuration runs six keys from 1..99 in the three configurations
// (baseline, dummies, dummies + adjuster) and checks results, equal point
// step times with dummies on, and that the adjuster recovers time; see
// wl_runner. Reduction polynomials are the standard ones for these sizes:
// x^131+x^8+x^3+x^2+1, x^163+x^7+x^6+x^3+1, x^193+x^15+1, x^233+x^74+1.
module tb_workload_fields;
  localparam int N = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] fin;
  int ck [N];
  int fl [N];

  wl_runner #(.M(131), .P(1), .F((132)'(1) << 131 | (132)'('h10D))) u_131_1 (.clk, .rst_n, .fin(fin[0]), .checks(ck[0]), .failures(fl[0]));
  wl_runner #(.M(131), .P(2), .F((132)'(1) << 131 | (132)'('h10D))) u_131_2 (.clk, .rst_n, .fin(fin[1]), .checks(ck[1]), .failures(fl[1]));
  wl_runner #(.M(131), .P(8), .F((132)'(1) << 131 | (132)'('h10D))) u_131_8 (.clk, .rst_n, .fin(fin[2]), .checks(ck[2]), .failures(fl[2]));
  wl_runner #(.M(163), .P(1), .F((164)'(1) << 163 | (164)'('hC9))) u_163_1 (.clk, .rst_n, .fin(fin[3]), .checks(ck[3]), .failures(fl[3]));
  wl_runner #(.M(163), .P(2), .F((164)'(1) << 163 | (164)'('hC9))) u_163_2 (.clk, .rst_n, .fin(fin[4]), .checks(ck[4]), .failures(fl[4]));
  wl_runner #(.M(163), .P(4), .F((164)'(1) << 163 | (164)'('hC9))) u_163_4 (.clk, .rst_n, .fin(fin[5]), .checks(ck[5]), .failures(fl[5]));
  wl_runner #(.M(163), .P(8), .F((164)'(1) << 163 | (164)'('hC9))) u_163_8 (.clk, .rst_n, .fin(fin[6]), .checks(ck[6]), .failures(fl[6]));
  wl_runner #(.M(193), .P(1), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1))) u_193_1 (.clk, .rst_n, .fin(fin[7]), .checks(ck[7]), .failures(fl[7]));
  wl_runner #(.M(193), .P(2), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1))) u_193_2 (.clk, .rst_n, .fin(fin[8]), .checks(ck[8]), .failures(fl[8]));
  wl_runner #(.M(193), .P(4), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1))) u_193_4 (.clk, .rst_n, .fin(fin[9]), .checks(ck[9]), .failures(fl[9]));
  wl_runner #(.M(193), .P(8), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1))) u_193_8 (.clk, .rst_n, .fin(fin[10]), .checks(ck[10]), .failures(fl[10]));
  wl_runner #(.M(233), .P(1), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1))) u_233_1 (.clk, .rst_n, .fin(fin[11]), .checks(ck[11]), .failures(fl[11]));
  wl_runner #(.M(233), .P(2), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1))) u_233_2 (.clk, .rst_n, .fin(fin[12]), .checks(ck[12]), .failures(fl[12]));
  wl_runner #(.M(233), .P(4), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1))) u_233_4 (.clk, .rst_n, .fin(fin[13]), .checks(ck[13]), .failures(fl[13]));
  wl_runner #(.M(233), .P(8), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1))) u_233_8 (.clk, .rst_n, .fin(fin[14]), .checks(ck[14]), .failures(fl[14]));

  initial begin
    repeat (8000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += ck[i]; failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
