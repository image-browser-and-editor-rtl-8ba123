// Testbench for the transformer with a 40x30 output and a 32x24 source
// image. For a set of scale/angle pairs (identity, zoom in and out, quarter
// and arbitrary turns, and random pairs) it starts the block, checks that
// setup takes the documented 21 clocks, then steps through every output
// pixel (with random stalls) and compares the source position with a
// floating-point evaluation of the inverse mapping; the integer pixel and
// the inside flag must follow the reported position exactly.
module tb_transformer;
  import img_pkg::*;
  localparam int OW = 40, OH = 30, IW = 32, IH = 24;
  logic clk = 0, rst = 1, start = 0, step = 0, ready, in_image;
  logic signed [SCALE_W-1:0] scale = 0;
  logic [ANGLE_W-1:0] angle = 0;
  logic signed [35:0] src_u, src_v;
  logic [4:0] src_x;
  logic [4:0] src_y;
  int checks = 0, failures = 0;
  int inside_seen = 0, outside_seen = 0;

  transformer #(.OUT_W(OW), .OUT_H(OH), .IMG_W(IW), .IMG_H(IH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic run_case(input int s, input int a);
    real m, th, ca, sa, dx, dy, eu, ev, gu, gv, tol;
    int setup;
    @(negedge clk);
    scale = SCALE_W'(s); angle = ANGLE_W'(a); start = 1;
    @(negedge clk); start = 0;
    setup = 1;
    while (!ready && setup < 100) begin @(negedge clk); setup++; end
    check(setup == 21, $sformatf("setup %0d clocks", setup));
    m  = 2.0 ** (-real'(s) / 4.0);
    th = real'(a) / 8192.0;
    tol = 0.005 + 0.004 * m;  // trig error grows with the inverse zoom
    ca = m * $cos(th);
    sa = m * $sin(th);
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        dx = real'(x) + 0.5 - real'(OW) / 2.0;
        dy = real'(y) + 0.5 - real'(OH) / 2.0;
        eu = real'(IW) / 2.0 + ca * dx + sa * dy;
        ev = real'(IH) / 2.0 - sa * dx + ca * dy;
        gu = real'(src_u) / 65536.0;
        gv = real'(src_v) / 65536.0;
        check((gu - eu < tol) && (eu - gu < tol) && (gv - ev < tol) && (ev - gv < tol),
              $sformatf("s%0d a%0d (%0d,%0d): got %f,%f exp %f,%f", s, a, x, y, gu, gv, eu, ev));
        begin
          int fu, fv;
          bit ins;
          fu = int'(src_u >>> 16);
          fv = int'(src_v >>> 16);
          ins = fu >= 0 && fu < IW && fv >= 0 && fv < IH;
          check(in_image == ins, "inside flag");
          if (ins) begin
            check(int'(src_x) == fu && int'(src_y) == fv, "integer pixel");
            inside_seen++;
          end else outside_seen++;
        end
        // step, sometimes with stall cycles
        while ($urandom_range(0, 7) == 0) begin step = 0; @(negedge clk); end
        step = 1; @(negedge clk); step = 0;
      end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run_case(0, 0);
    run_case(4, 0);
    run_case(-4, 0);
    run_case(0, 12868);       // pi/2
    run_case(0, 25736);       // pi
    run_case(2, 1000);
    run_case(-3, 30000);
    run_case(5, 51000);
    run_case(-16, 40000);
    run_case(15, 7000);
    for (int k = 0; k < 6; k++) run_case($urandom_range(0, 31) - 16, $urandom_range(0, 51471));
    check(inside_seen > 0 && outside_seen > 0, "both inside and outside seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
