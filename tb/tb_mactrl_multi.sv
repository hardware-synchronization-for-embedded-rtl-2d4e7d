// tb_mactrl_multi: end-to-end test of the Multi-Access Controller with more than two
// cores. Runs the mactrl_env scenario (contention, fairness bound, global lock, block
// locks, barriers over subsets of cores) on a four-core and an eight-core controller
// side by side and reports the combined result.
module tb_mactrl_multi;
  logic done4, done8;
  int checks4, failures4, checks8, failures8;

  mactrl_env #(.NC(4)) u_env4 (.done(done4), .checks(checks4), .failures(failures4));
  mactrl_env #(.NC(8)) u_env8 (.done(done8), .checks(checks8), .failures(failures8));

  initial begin
    fork
      wait (done4 && done8);
      #5000000;
    join_any
    if (!(done4 && done8)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8);
    end
    $finish;
  end
endmodule
