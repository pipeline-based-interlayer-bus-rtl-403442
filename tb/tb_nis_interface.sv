// tb_nis_interface: self-checking test of nis_interface in both builds: with
// bi-synchronous queues (layer clock period 14, bus clock period 10) and with
// single-clock queues, plus the bi-synchronous build on one clock with its
// synchronous mode switched on and off. See nis_interface_env for the checks.
module tb_nis_interface;
  int c_a, f_a, c_s, f_s, c_m, f_m, checks, failures;
  bit d_a, d_s, d_m;

  nis_interface_env #(.ASYNC(1'b1)) e_async (.checks(c_a), .failures(f_a), .done(d_a));
  nis_interface_env #(.ASYNC(1'b0)) e_sync  (.checks(c_s), .failures(f_s), .done(d_s));
  nis_interface_env #(.ASYNC(1'b1), .ONE_CLOCK(1'b1)) e_mode (.checks(c_m), .failures(f_m), .done(d_m));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_s + c_m, f_a + f_s + f_m + 1);
    $finish;
  end

  initial begin
    wait (d_a && d_s && d_m);
    checks = c_a + c_s + c_m; failures = f_a + f_s + f_m;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
