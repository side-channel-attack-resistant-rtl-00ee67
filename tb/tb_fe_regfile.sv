// tb_fe_regfile -- self-checking test of the field register file.
//
// Checks reset to zero, writes to random entries with random data, reads on
// all three ports against a scoreboard, and that a write is visible from the
// next cycle only.
module tb_fe_regfile;
  localparam int M = 131;
  localparam int D = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [4:0] wa = '0, ra = '0, rb = '0, rc = '0;
  logic [M-1:0] wd = '0, qa, qb, qc;
  logic [M-1:0] model [D];

  fe_regfile dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd), .raddr_a(ra), .raddr_b(rb),
                  .raddr_c(rc), .rdata_a(qa), .rdata_b(qb), .rdata_c(qc));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); ra = 5'(i); rb = 5'(D-1-i); rc = 5'(i);
      #1; checks++;
      if (qa !== '0 || qb !== '0 || qc !== '0) begin failures++; $display("FAIL reset %0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0; wa = 5'($urandom); wd = rnd();
      ra = 5'($urandom); rb = wa; rc = 5'($urandom);
      #1;
      checks++;
      // before the edge the old contents are read
      if (qa !== model[ra] || qb !== model[rb] || qc !== model[rc]) begin
        failures++; $display("FAIL read %0d", n);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      ra = 5'(i); #1; checks++;
      if (qa !== model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
