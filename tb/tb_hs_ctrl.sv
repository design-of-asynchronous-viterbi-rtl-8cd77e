// tb_hs_ctrl: checks the 4-phase stage controller. A source sends numbered
// tokens with random gaps, obeying the 4-phase protocol; the stage register
// here captures on `load`; a sink acknowledges after random delays. Every
// third token is loaded with produce low and must not appear at the output.
// Checks: tokens arrive in order and complete, the protocol rules hold on
// both channels, load only fires on a fresh request, and an unstalled token
// is offered on out_req one clock after it is stored.
module tb_hs_ctrl;
  logic clk = 0, rst = 1;
  logic in_req, in_ack, out_req, out_ack, produce, load, full;
  logic [7:0] in_data, stage_q;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_expect = 0;
  localparam int N = 60;

  always #5 clk = ~clk;

  hs_ctrl dut (.*);

  assign produce = (in_data % 3) != 2;

  always_ff @(posedge clk) if (load) stage_q <= in_data;

  // source
  initial begin
    in_req = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      in_data <= 8'(i);
      in_req  <= 1;
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      in_req <= 0;
      @(posedge clk);
      while (in_ack) @(posedge clk);
      n_sent++;
    end
  end

  // sink
  initial begin
    int expect_v;
    expect_v = 0;
    out_ack = 0;
    wait (rst == 0);
    forever begin
      @(posedge clk);
      if (out_req && !out_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        while (expect_v % 3 == 2) expect_v++;
        checks++;
        if (stage_q != 8'(expect_v)) begin
          failures++;
          $display("FAIL: got token %0d expected %0d", stage_q, expect_v);
        end
        expect_v++;
        n_recv++;
        out_ack <= 1;
        @(posedge clk);
        while (out_req) @(posedge clk);
        out_ack <= 0;
      end
    end
  end

  // protocol monitors
  logic p_in_req, p_in_ack, p_out_req, p_out_ack, p_full;
  always_ff @(posedge clk) begin
    p_in_req <= in_req; p_in_ack <= in_ack; p_out_req <= out_req; p_out_ack <= out_ack;
    p_full <= full;
    if (!rst) begin
      if (in_ack && !p_in_ack) begin checks++; if (!p_in_req) begin failures++; $display("FAIL: ack rose without req"); end end
      if (!in_ack && p_in_ack) begin checks++; if (p_in_req) begin failures++; $display("FAIL: ack fell while req high"); end end
      if (out_req && !p_out_req) begin checks++; if (p_out_ack) begin failures++; $display("FAIL: out_req rose while ack high"); end end
      if (!out_req && p_out_req) begin checks++; if (!p_out_ack) begin failures++; $display("FAIL: out_req fell without ack"); end end
      if (load) begin checks++; if (in_ack || !in_req) begin failures++; $display("FAIL: load without fresh req"); end end
      // a stored token is offered on the next clock when the channel is idle
      if (p_full && !p_out_req && !p_out_ack) begin
        checks++;
        if (!out_req) begin failures++; $display("FAIL: out_req late"); end
      end
    end
  end

  initial begin
    wait (n_sent == N);
    repeat (20) @(posedge clk);
    n_expect = 0;
    for (int i = 0; i < N; i++) if (i % 3 != 2) n_expect++;
    checks++;
    if (n_recv != n_expect) begin failures++; $display("FAIL: received %0d of %0d", n_recv, n_expect); end
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
