// Check counting shared by the unit testbenches.
int checks = 0;
int failures = 0;

function automatic void check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 10) $display("FAIL: %s", what);
  end
endfunction

function automatic void report();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
endfunction
