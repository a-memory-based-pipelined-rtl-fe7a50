// End-to-end test of the blocking-effect remover at a reduced size
// (48-pixel lines, 3 strips per frame). Five frames are sent: two back to
// back with free-flowing input and output, then, after a pause that makes
// the pipeline drain through empty steps, three more with random gaps in
// the input and random output back-pressure. Every output pixel is
// compared with the reference model (bre_ref.svh). The test also checks
// the step length (8*WIDTH cycles plus a small overhead when nothing
// stalls), the latency of four steps from a strip's input to its output,
// and that each mechanism occurred: all five edge classes, input stalls,
// output back-pressure, empty steps, and filtering at the picture border.
module tb_bre_top;
  import bre_pkg::*;

  localparam int W  = 48;
  localparam int ST = 3;
  localparam int H  = ST * 8;
  localparam int NF = 5;
  typedef byte unsigned frame_t [H][W];

  `include "bre_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  pix_t in_pix = '0, out_pix;
  logic step_start, bubble;

  bre_top #(.WIDTH(W), .STRIPS(ST)) dut (.*);

  always #5 clk = ~clk;

  frame_t frames [NF];
  int checks = 0, failures = 0;
  int n_dir [5];
  int n_in_stall = 0, n_backpressure = 0, n_bubble = 0, n_steps = 0;
  int n_edge_rep = 0;
  bit rand_mode = 1'b0;
  longint cyc = 0;
  longint first_in = -1, first_out = -1;
  longint step_t0 = 0;
  int max_free_step = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.dir_we) n_dir[int'(dut.dir_w)]++;
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_backpressure++;
    if (bubble) n_bubble++;
    if (dut.u_hmap.busy && (dut.u_hmap.rowrep0 != 0 || dut.u_hmap.colrep0 != 0)) n_edge_rep++;
    if (dut.u_vmap.busy && (dut.u_vmap.rowrep0 != 0)) n_edge_rep++;
    if (step_start) begin
      // steps of the first two frames run without stalls
      if (!rand_mode && n_steps > 0 && !bubble && (cyc - step_t0) > max_free_step)
        max_free_step = int'(cyc - step_t0);
      step_t0 = cyc;
      n_steps++;
    end
  end

  // source
  initial begin
    foreach (n_dir[i]) n_dir[i] = 0;
    for (int f = 0; f < NF; f++) make_frame(frames[f], f);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      if (f == 2) begin
        repeat (200) @(posedge clk);   // idle gap between frames
        rand_mode = 1'b1;
      end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (rand_mode) while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1'b1;
          in_pix   = pix_t'(frames[f][y][x]);
          while (!in_ready) @(negedge clk);
          if (first_in < 0) first_in = cyc;
          @(posedge clk);
          #1 in_valid = 1'b0;
        end
    end
  end

  // back-pressure
  always @(posedge clk) out_ready <= rand_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  // sink
  initial begin
    int e;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while (!(out_valid && out_ready)) @(negedge clk);
          if (first_out < 0) first_out = cyc;
          e = ref_out(frames[f], y, x);
          checks++;
          if (int'(out_pix) != e) begin
            failures++;
            if (failures < 10) $display("mismatch frame %0d y %0d x %0d: got %0d expected %0d", f, y, x, out_pix, e);
          end
        end
    // timing
    checks++;
    if (max_free_step > 8 * W + 8 || max_free_step < 8 * W) begin
      failures++;
      $display("free-flowing step took %0d cycles", max_free_step);
    end
    checks++;
    if (first_out - first_in < 4 * 8 * W || first_out - first_in > 4 * (8 * W + 8) + 4) begin
      failures++;
      $display("latency %0d cycles", first_out - first_in);
    end
    // mechanisms
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("edge class %0d never seen", d); end
    end
    checks += 4;
    if (n_in_stall == 0)     begin failures++; $display("no input stall"); end
    if (n_backpressure == 0) begin failures++; $display("no output back-pressure"); end
    if (n_bubble == 0)       begin failures++; $display("no empty step"); end
    if (n_edge_rep == 0)     begin failures++; $display("no border replication"); end
    $display("classes mono/0/45/90/135 = %0d/%0d/%0d/%0d/%0d, input stalls %0d, back-pressure %0d, empty steps %0d, border taps %0d, steps %0d, step %0d cycles, latency %0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4], n_in_stall, n_backpressure,
             n_bubble, n_edge_rep, n_steps, max_free_step, first_out - first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
