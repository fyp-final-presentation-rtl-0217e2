// Shared testbench helpers: check counters, a CHECK macro and the final
// result line. Include inside a testbench module.
// Nothing here comes from the design.
int checks = 0;
int failures = 0;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
