// compute_bound_tb: the compute-bound throughput workload on two cores
// side by side: the default 8-lane core and a 16-lane core (the 16-wide
// case of the throughput comparison). Each bench runs the kernel at
// violation probabilities 0, 0.02, 0.05 and 0.10 and checks both the results
// and that throughput follows a single scalar pipeline with the per-lane
// error rate rather than lock-step lanes (see throughput_bench).
module compute_bound_tb;
  logic fin8, fin16;
  int c8, f8, c16, f16;
  int checks, failures;

  throughput_bench #(.L(8))  b8  (.finished(fin8),  .checks(c8),  .failures(f8));
  throughput_bench #(.L(16)) b16 (.finished(fin16), .checks(c16), .failures(f16));

  initial begin
    fork
      begin
        #100;
        wait (fin8 === 1'b1 && fin16 === 1'b1);
        checks = c8 + c16;
        failures = f8 + f16;
      end
      begin
        #2ms;
        checks = c8 + c16;
        failures = f8 + f16 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
