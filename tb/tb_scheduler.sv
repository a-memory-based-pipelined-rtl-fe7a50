// Test of the scheduler with 3 strips per frame. The units are modelled by
// busy counters of random length started by the scheduler's pulses. Checked
// per step: operation k works on module (w-k) mod 6 with w advancing by one
// per step; a step ends only when all units are done; the unit of
// operation k>0 is started exactly when its module received a strip k
// steps earlier; first/last flags follow the strip's place in its frame;
// inside a frame the write step waits for input, between frames a step
// without input is empty.
module tb_scheduler;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int ST = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, bubble;
  logic [NOPS-1:0] done, start, first, last;
  mod_idx_t [NOPS-1:0] mod_op;
  scheduler #(.STRIPS(ST)) dut (.*);
  always #5 clk = ~clk;

  int busy [NOPS];
  always_comb for (int k = 0; k < NOPS; k++) done[k] = (busy[k] == 0);
  always @(posedge clk) for (int k = 0; k < NOPS; k++)
    if (start[k]) busy[k] <= $urandom_range(1, 20);
    else if (busy[k] > 0) busy[k] <= busy[k] - 1;

  // history of steps: did step s write a strip, and its frame position
  int hist_w [1000];
  int hist_pos [1000];
  int step = 0, expect_w = 0, strip_pos = 0, n_bubble = 0, n_started [NOPS];
  logic stepping;
  always @(negedge clk) if (rst_n && (|start || bubble)) begin
    check(int'(mod_op[0]) == expect_w, "write module advances by one per step");
    for (int k = 0; k < NOPS; k++)
      check(int'(mod_op[k]) == (expect_w - k + 2 * NMOD) % NMOD, $sformatf("operation %0d module", k));
    hist_w[step] = start[0];
    hist_pos[step] = strip_pos;
    check(start[0] == (in_valid || strip_pos != 0), "write runs inside a frame or with input");
    check(bubble == !start[0], "empty step flagged");
    if (bubble) n_bubble++;
    for (int k = 1; k < NOPS; k++) begin
      bit exp_s;
      exp_s = (step >= k) ? bit'(hist_w[step - k]) : 1'b0;
      check(start[k] == exp_s, $sformatf("step %0d operation %0d started", step, k));
      if (start[k]) begin
        n_started[k]++;
        check(first[k] == (hist_pos[step - k] == 0) && last[k] == (hist_pos[step - k] == ST - 1),
              "first/last flags");
      end
    end
    if (start[0]) strip_pos = (strip_pos + 1) % ST;
    // all units must be done before the step changed
    expect_w = (expect_w + 1) % NMOD;
    step++;
  end
  // a new step begins only after every unit reported done
  logic [NOPS-1:0] done_q;
  always @(posedge clk) done_q <= done;
  always @(negedge clk) if (rst_n && step > 0 && (|start || bubble))
    check(&done_q || step == 0, "previous step finished");

  initial begin
    foreach (busy[k]) busy[k] = 0;
    foreach (n_started[k]) n_started[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);               // idle: empty steps
    for (int f = 0; f < 3; f++) begin
      in_valid = 1;
      repeat ($urandom_range(50, 200)) @(negedge clk);
      if (f == 1) begin in_valid = 0; repeat (300) @(negedge clk); end
    end
    in_valid = 0;
    repeat (400) @(negedge clk);
    check(n_bubble > 0, "empty steps seen");
    for (int k = 0; k < NOPS; k++) check(k == 0 || n_started[k] > 3, "all operations ran");
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
