// tb_gf_mul_sizes -- the parallel multiplier at every field size and core
// count of the characteristics table.
//
// Field sizes 131, 163, 193, 233, 239, 283, 409 and 571 bits, each on 1, 2,
// 4 and 8 lanes of 32 bits, run side by side (see gfm_runner). Each checks
// products and latency, and that the number of rounds and of lanes left idle
// in the last round are those of the table:
//   rounds      (1/2/4/8 lanes): 131: 5/3/2/1   163: 6/3/2/1   193: 7/4/2/1
//               233: 8/4/2/1  239: 8/4/2/1  283: 9/5/3/2  409: 13/7/4/2  571: 18/9/5/3
//   idle lanes  (1/2/4/8 lanes): 131: 0/1/3/3   163: 0/0/2/2   193: 0/1/1/1
//               233: 0/0/0/0  239: 0/0/0/0  283: 0/1/3/7  409: 0/1/3/3  571: 0/0/2/6
// Reduction polynomials are the standard (SEC 2) ones for these sizes:
//   x^131+x^8+x^3+x^2+1, x^163+x^7+x^6+x^3+1, x^193+x^15+1, x^233+x^74+1,
//   x^239+x^158+1, x^283+x^12+x^7+x^5+1, x^409+x^87+1, x^571+x^10+x^5+x^2+1.
module tb_gf_mul_sizes;
  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] fin;
  int ck [N];
  int fl [N];

  gfm_runner #(.M(131), .P(1), .F((132)'(1) << 131 | (132)'(1) << 8 | (132)'(1) << 3 | (132)'(1) << 2 | (132)'(1)), .EXP_ROUNDS(5), .EXP_IDLE(0))
    u_131_1 (.clk, .rst_n, .fin(fin[0]), .checks(ck[0]), .failures(fl[0]));
  gfm_runner #(.M(131), .P(2), .F((132)'(1) << 131 | (132)'(1) << 8 | (132)'(1) << 3 | (132)'(1) << 2 | (132)'(1)), .EXP_ROUNDS(3), .EXP_IDLE(1))
    u_131_2 (.clk, .rst_n, .fin(fin[1]), .checks(ck[1]), .failures(fl[1]));
  gfm_runner #(.M(131), .P(4), .F((132)'(1) << 131 | (132)'(1) << 8 | (132)'(1) << 3 | (132)'(1) << 2 | (132)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(3))
    u_131_4 (.clk, .rst_n, .fin(fin[2]), .checks(ck[2]), .failures(fl[2]));
  gfm_runner #(.M(131), .P(8), .F((132)'(1) << 131 | (132)'(1) << 8 | (132)'(1) << 3 | (132)'(1) << 2 | (132)'(1)), .EXP_ROUNDS(1), .EXP_IDLE(3))
    u_131_8 (.clk, .rst_n, .fin(fin[3]), .checks(ck[3]), .failures(fl[3]));
  gfm_runner #(.M(163), .P(1), .F((164)'(1) << 163 | (164)'(1) << 7 | (164)'(1) << 6 | (164)'(1) << 3 | (164)'(1)), .EXP_ROUNDS(6), .EXP_IDLE(0))
    u_163_1 (.clk, .rst_n, .fin(fin[4]), .checks(ck[4]), .failures(fl[4]));
  gfm_runner #(.M(163), .P(2), .F((164)'(1) << 163 | (164)'(1) << 7 | (164)'(1) << 6 | (164)'(1) << 3 | (164)'(1)), .EXP_ROUNDS(3), .EXP_IDLE(0))
    u_163_2 (.clk, .rst_n, .fin(fin[5]), .checks(ck[5]), .failures(fl[5]));
  gfm_runner #(.M(163), .P(4), .F((164)'(1) << 163 | (164)'(1) << 7 | (164)'(1) << 6 | (164)'(1) << 3 | (164)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(2))
    u_163_4 (.clk, .rst_n, .fin(fin[6]), .checks(ck[6]), .failures(fl[6]));
  gfm_runner #(.M(163), .P(8), .F((164)'(1) << 163 | (164)'(1) << 7 | (164)'(1) << 6 | (164)'(1) << 3 | (164)'(1)), .EXP_ROUNDS(1), .EXP_IDLE(2))
    u_163_8 (.clk, .rst_n, .fin(fin[7]), .checks(ck[7]), .failures(fl[7]));
  gfm_runner #(.M(193), .P(1), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1)), .EXP_ROUNDS(7), .EXP_IDLE(0))
    u_193_1 (.clk, .rst_n, .fin(fin[8]), .checks(ck[8]), .failures(fl[8]));
  gfm_runner #(.M(193), .P(2), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1)), .EXP_ROUNDS(4), .EXP_IDLE(1))
    u_193_2 (.clk, .rst_n, .fin(fin[9]), .checks(ck[9]), .failures(fl[9]));
  gfm_runner #(.M(193), .P(4), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(1))
    u_193_4 (.clk, .rst_n, .fin(fin[10]), .checks(ck[10]), .failures(fl[10]));
  gfm_runner #(.M(193), .P(8), .F((194)'(1) << 193 | (194)'(1) << 15 | (194)'(1)), .EXP_ROUNDS(1), .EXP_IDLE(1))
    u_193_8 (.clk, .rst_n, .fin(fin[11]), .checks(ck[11]), .failures(fl[11]));
  gfm_runner #(.M(233), .P(1), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1)), .EXP_ROUNDS(8), .EXP_IDLE(0))
    u_233_1 (.clk, .rst_n, .fin(fin[12]), .checks(ck[12]), .failures(fl[12]));
  gfm_runner #(.M(233), .P(2), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1)), .EXP_ROUNDS(4), .EXP_IDLE(0))
    u_233_2 (.clk, .rst_n, .fin(fin[13]), .checks(ck[13]), .failures(fl[13]));
  gfm_runner #(.M(233), .P(4), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(0))
    u_233_4 (.clk, .rst_n, .fin(fin[14]), .checks(ck[14]), .failures(fl[14]));
  gfm_runner #(.M(233), .P(8), .F((234)'(1) << 233 | (234)'(1) << 74 | (234)'(1)), .EXP_ROUNDS(1), .EXP_IDLE(0))
    u_233_8 (.clk, .rst_n, .fin(fin[15]), .checks(ck[15]), .failures(fl[15]));
  gfm_runner #(.M(239), .P(1), .F((240)'(1) << 239 | (240)'(1) << 158 | (240)'(1)), .EXP_ROUNDS(8), .EXP_IDLE(0))
    u_239_1 (.clk, .rst_n, .fin(fin[16]), .checks(ck[16]), .failures(fl[16]));
  gfm_runner #(.M(239), .P(2), .F((240)'(1) << 239 | (240)'(1) << 158 | (240)'(1)), .EXP_ROUNDS(4), .EXP_IDLE(0))
    u_239_2 (.clk, .rst_n, .fin(fin[17]), .checks(ck[17]), .failures(fl[17]));
  gfm_runner #(.M(239), .P(4), .F((240)'(1) << 239 | (240)'(1) << 158 | (240)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(0))
    u_239_4 (.clk, .rst_n, .fin(fin[18]), .checks(ck[18]), .failures(fl[18]));
  gfm_runner #(.M(239), .P(8), .F((240)'(1) << 239 | (240)'(1) << 158 | (240)'(1)), .EXP_ROUNDS(1), .EXP_IDLE(0))
    u_239_8 (.clk, .rst_n, .fin(fin[19]), .checks(ck[19]), .failures(fl[19]));
  gfm_runner #(.M(283), .P(1), .F((284)'(1) << 283 | (284)'(1) << 12 | (284)'(1) << 7 | (284)'(1) << 5 | (284)'(1)), .EXP_ROUNDS(9), .EXP_IDLE(0))
    u_283_1 (.clk, .rst_n, .fin(fin[20]), .checks(ck[20]), .failures(fl[20]));
  gfm_runner #(.M(283), .P(2), .F((284)'(1) << 283 | (284)'(1) << 12 | (284)'(1) << 7 | (284)'(1) << 5 | (284)'(1)), .EXP_ROUNDS(5), .EXP_IDLE(1))
    u_283_2 (.clk, .rst_n, .fin(fin[21]), .checks(ck[21]), .failures(fl[21]));
  gfm_runner #(.M(283), .P(4), .F((284)'(1) << 283 | (284)'(1) << 12 | (284)'(1) << 7 | (284)'(1) << 5 | (284)'(1)), .EXP_ROUNDS(3), .EXP_IDLE(3))
    u_283_4 (.clk, .rst_n, .fin(fin[22]), .checks(ck[22]), .failures(fl[22]));
  gfm_runner #(.M(283), .P(8), .F((284)'(1) << 283 | (284)'(1) << 12 | (284)'(1) << 7 | (284)'(1) << 5 | (284)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(7))
    u_283_8 (.clk, .rst_n, .fin(fin[23]), .checks(ck[23]), .failures(fl[23]));
  gfm_runner #(.M(409), .P(1), .F((410)'(1) << 409 | (410)'(1) << 87 | (410)'(1)), .EXP_ROUNDS(13), .EXP_IDLE(0))
    u_409_1 (.clk, .rst_n, .fin(fin[24]), .checks(ck[24]), .failures(fl[24]));
  gfm_runner #(.M(409), .P(2), .F((410)'(1) << 409 | (410)'(1) << 87 | (410)'(1)), .EXP_ROUNDS(7), .EXP_IDLE(1))
    u_409_2 (.clk, .rst_n, .fin(fin[25]), .checks(ck[25]), .failures(fl[25]));
  gfm_runner #(.M(409), .P(4), .F((410)'(1) << 409 | (410)'(1) << 87 | (410)'(1)), .EXP_ROUNDS(4), .EXP_IDLE(3))
    u_409_4 (.clk, .rst_n, .fin(fin[26]), .checks(ck[26]), .failures(fl[26]));
  gfm_runner #(.M(409), .P(8), .F((410)'(1) << 409 | (410)'(1) << 87 | (410)'(1)), .EXP_ROUNDS(2), .EXP_IDLE(3))
    u_409_8 (.clk, .rst_n, .fin(fin[27]), .checks(ck[27]), .failures(fl[27]));
  gfm_runner #(.M(571), .P(1), .F((572)'(1) << 571 | (572)'(1) << 10 | (572)'(1) << 5 | (572)'(1) << 2 | (572)'(1)), .EXP_ROUNDS(18), .EXP_IDLE(0))
    u_571_1 (.clk, .rst_n, .fin(fin[28]), .checks(ck[28]), .failures(fl[28]));
  gfm_runner #(.M(571), .P(2), .F((572)'(1) << 571 | (572)'(1) << 10 | (572)'(1) << 5 | (572)'(1) << 2 | (572)'(1)), .EXP_ROUNDS(9), .EXP_IDLE(0))
    u_571_2 (.clk, .rst_n, .fin(fin[29]), .checks(ck[29]), .failures(fl[29]));
  gfm_runner #(.M(571), .P(4), .F((572)'(1) << 571 | (572)'(1) << 10 | (572)'(1) << 5 | (572)'(1) << 2 | (572)'(1)), .EXP_ROUNDS(5), .EXP_IDLE(2))
    u_571_4 (.clk, .rst_n, .fin(fin[30]), .checks(ck[30]), .failures(fl[30]));
  gfm_runner #(.M(571), .P(8), .F((572)'(1) << 571 | (572)'(1) << 10 | (572)'(1) << 5 | (572)'(1) << 2 | (572)'(1)), .EXP_ROUNDS(3), .EXP_IDLE(6))
    u_571_8 (.clk, .rst_n, .fin(fin[31]), .checks(ck[31]), .failures(fl[31]));

  initial begin
    repeat (200000) @(posedge clk);
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
