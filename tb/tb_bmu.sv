// tb_bmu: sends every soft pair (i0, i1) in -3..+3 (and then random ones)
// through the branch metric stage with the 4-phase protocol and random
// acknowledge delays, and checks the four metrics against the reference
// bm = (v1 ? -i0 : i0) + (v2 ? -i1 : i1); bm[01] must equal i0 - i1.
module tb_bmu;
  import viterbi_pkg::*;
  import vit_ref_pkg::*;
  localparam int N = 49 + 40;
  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack;
  sym_t    in_data;
  bm_vec_t out_data;
  sym_t    sent [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bmu dut (.*);

  initial begin
    in_req = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      if (i < 49) sent[i] = '{i0: soft_t'(i / 7 - 3), i1: soft_t'(i % 7 - 3)};
      else        sent[i] = '{i0: soft_t'($urandom_range(0, 6) - 3), i1: soft_t'($urandom_range(0, 6) - 3)};
      repeat ($urandom_range(0, 2)) @(posedge clk);
      in_data <= sent[i];
      in_req  <= 1;
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      in_req <= 0;
      @(posedge clk);
      while (in_ack) @(posedge clk);
    end
  end

  initial begin
    out_ack = 0;
    wait (rst == 0);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      while (!out_req) @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(out_data[c]) != ref_bm(int'(sent[i].i0), int'(sent[i].i1), c[1], c[0])) begin
          failures++;
          $display("FAIL: pair %0d,%0d code %0d got %0d", sent[i].i0, sent[i].i1, c, out_data[c]);
        end
      end
      checks++;
      if (int'(out_data[2'b01]) != int'(sent[i].i0) - int'(sent[i].i1)) begin
        failures++; $display("FAIL: bm01 != i0 - i1");
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      out_ack <= 1;
      @(posedge clk);
      while (out_req) @(posedge clk);
      out_ack <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
