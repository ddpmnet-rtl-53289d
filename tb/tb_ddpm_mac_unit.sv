// tb_ddpm_mac_unit: random instruction streams against a counting model.
//
// Each cycle a random instruction (count up/down on each select value,
// NOP, CLR, STORE, STORE_RELU, reserved codes) and random pulse inputs are
// applied; a model of the counter and output register, written with plain
// integers and wrapped to 12 bits, predicts the output register, which is
// compared every cycle. Directed steps check that ReLU clamps a negative
// count to 0, that STORE keeps the sign, and that the 12-bit counter wraps.
module tb_ddpm_mac_unit;
  import ddpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] d;
  mac_op_t op;
  logic signed [11:0] q;
  int checks = 0, failures = 0;
  int m_cnt = 0, m_q = 0;

  ddpm_mac_unit dut (.clk, .rst_n, .d, .op, .q);

  always #5 clk = ~clk;

  function automatic int wrap12(int v);
    v = v & 32'hFFF;
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  task automatic step(mac_op_t o, logic [1:0] din);
    int bitv;
    op = o; d = din;
    @(negedge clk);
    if (o[3] == 1'b0) begin
      bitv = (o[1:0] == 2'd0) ? int'(din[0]) : (o[1:0] == 2'd1) ? int'(din[1]) : 1;
      m_cnt = wrap12(m_cnt + (o[2] ? -bitv : bitv));
    end else if (o == 4'b1001) m_cnt = 0;
    else if (o == 4'b1010) m_q = (m_cnt < 0) ? 0 : m_cnt;
    else if (o == 4'b1011) m_q = m_cnt;
    checks++;
    if (int'(q) != m_q) begin
      failures++;
      $display("FAIL op=%b: q=%0d expected %0d", o, q, m_q);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NOP; d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: 5 down counts with constant-1 select, ReLU gives 0, STORE -5
    for (int i = 0; i < 5; i++) step(op_count(1'b1, 2'd2), 2'b00);
    step(OP_STORE_RELU, 2'b00);
    step(OP_STORE, 2'b00);
    checks++;
    if (q != -12'sd5) begin failures++; $display("FAIL STORE of -5 gave %0d", q); end
    step(OP_CLR, 2'b11);
    // directed: count port 1 only when its pulse is 1
    for (int i = 0; i < 8; i++) step(op_count(1'b0, 2'd1), 2'(i));
    step(OP_STORE_RELU, 2'b00);
    checks++;
    if (q != 12'sd4) begin failures++; $display("FAIL port-1 count gave %0d", q); end
    // directed: 2048 up counts on the constant-1 input wrap 0 to -2048
    step(OP_CLR, 2'b00);
    for (int i = 0; i < 2048; i++) step(op_count(1'b0, 2'd3), 2'b00);
    step(OP_STORE, 2'b00);
    checks++;
    if (q != -12'sd2048) begin failures++; $display("FAIL wrap gave %0d", q); end
    step(OP_CLR, 2'b00);
    // random
    for (int i = 0; i < 20000; i++) begin
      automatic int r = int'($urandom_range(0, 99));
      mac_op_t o;
      if (r < 70)      o = {1'b0, 3'($urandom)};
      else if (r < 78) o = OP_STORE_RELU;
      else if (r < 86) o = OP_STORE;
      else if (r < 89) o = OP_CLR;
      else             o = {2'b11, 2'($urandom)} ^ {2'b0, 2'($urandom)} ;
      if (r >= 89 && r < 95) o = OP_NOP;
      step(o, 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
