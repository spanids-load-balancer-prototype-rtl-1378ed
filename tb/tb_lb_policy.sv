// Testbench for lb_policy: random operands (including values on both
// sides of the decision boundary) held for one cycle each; three cycles
// later hot must equal 4*rate*buckets > threshold*total and the debug
// operand and product outputs must match.
module tb_lb_policy;
  logic clk = 0, reset = 1;
  logic [23:0] rate = 0, total = 0;
  logic [11:0] buckets = 0;
  logic [7:0] threshold = 0;
  logic hot;
  logic [31:0] mult0_op0, mult0_op1, mult1_op0, mult1_op1;
  logic [63:0] mult0_res, mult1_res;
  int checks = 0, failures = 0;
  lb_policy dut (.*);
  always #5 clk = ~clk;
  initial begin #5_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  typedef struct { longint r, b, t, th; } ops_t;
  ops_t hist[$];
  int nhot = 0, ncold = 0;

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    for (int i = 0; i < 5000; i++) begin
      ops_t o;
      @(negedge clk);
      buckets = 12'(1 + $urandom % 4095); threshold = 8'($urandom);
      total = 24'($urandom);
      if ($urandom % 2) rate = 24'($urandom);
      else rate = 24'((longint'(threshold) * total) / (4 * longint'(buckets)) + ($urandom % 3) - 1);
      o.r = rate; o.b = buckets; o.t = total; o.th = threshold;
      hist.push_back(o);
      if (hist.size() > 3) begin
        ops_t p;
        logic e;
        p = hist.pop_front();
        #1;
        e = 4 * p.r * p.b > p.th * p.t;
        check(hot == e, $sformatf("hot r=%0d b=%0d t=%0d th=%0d", p.r, p.b, p.t, p.th));
        if (e) nhot++; else ncold++;
      end
    end
    @(negedge clk);
    check(mult0_op0 == 32'(rate) && mult0_op1 == 32'(buckets), "multiplier 0 operands");
    check(mult1_op0 == 32'(total) && mult1_op1 == 32'(threshold), "multiplier 1 operands");
    @(negedge clk);
    check(mult0_res == 64'(rate) * 64'(buckets) && mult1_res == 64'(total) * 64'(threshold), "products");
    check(nhot > 500 && ncold > 500, "both outcomes");
    finish();
  end
endmodule
