// rr_arbiter_tb: random request vectors against a rotating-priority model;
// also checks that with all five inputs requesting the grants rotate
// 0,1,2,3,4 and that en low grants nothing and freezes the pointer.
module rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, nreset = 0, en;
  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(logic [N-1:0] r, logic e, int p);
    logic [N-1:0] g = '0;
    if (!e) return g;
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) begin g[(p + k) % N] = 1'b1; return g; end
    return g;
  endfunction

  task automatic step(logic [N-1:0] r, logic e);
    logic [N-1:0] exp;
    @(negedge clk);
    req = r; en = e;
    #1;
    exp = model(r, e, ptr);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL req=%b en=%b ptr=%0d grant=%b exp=%b", r, e, ptr, grant, exp);
    end
    for (int i = 0; i < N; i++) if (exp[i]) ptr = (i + 1) % N;
  endtask

  initial begin
    req = '0; en = 0;
    repeat (2) @(posedge clk);
    nreset = 1;
    // full load: strict rotation
    for (int n = 0; n < 10; n++) begin
      step('1, 1'b1);
      checks++;
      if (grant != N'(1) << (n % N)) begin failures++; $display("FAIL rotation n=%0d", n); end
    end
    step('1, 1'b0);
    step(5'b00110, 1'b1);
    for (int n = 0; n < 1000; n++) step(N'($urandom), ($urandom % 4) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
