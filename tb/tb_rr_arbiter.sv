// tb_rr_arbiter: self-checking test of rr_arbiter with three requesters.
// Each cycle random requests and a random 'advance' are applied; the grant is
// compared with a reference model of round-robin priority (search starts after
// the last accepted winner), and continuous requests must rotate 0,1,2,0,...
module tb_rr_arbiter;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  logic advance = 0;
  int checks = 0, failures = 0;
  int last = N - 1;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] expect_grant(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return N'(1) << ((l + k) % N);
    return '0;
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Continuous requests rotate.
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); req = '1; advance = 1; #1;
      check(grant == N'(1) << (i % N), "rotation under full load");
      @(posedge clk);
      last = i % N;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom); advance = $urandom_range(0, 3) != 0; #1;
      check(grant == expect_grant(req, last), "grant matches model");
      @(posedge clk);
      if (advance && req != 0) last = $clog2(int'(expect_grant(req, last)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
