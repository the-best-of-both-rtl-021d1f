// tb_sobel_accel: streams two random 24 x 7 frames (the second one with
// idle cycles between pixels) through the accelerator and compares every
// output with a Sobel magnitude min(|Gx|+|Gy|, 255) computed here from the
// frame. Each output must come two cycles after the pixel that completes its
// window, and a frame must give (W-2) x (H-2) outputs.
module tb_sobel_accel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam int W = 24, H = 7;
  logic in_valid = 0, in_sof = 0; logic [7:0] in_pix = 0;
  logic out_valid; logic [7:0] out_pix; logic [$clog2(W)-1:0] out_x; logic [15:0] out_y;
  sobel_accel #(.IMG_W(W)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_pix,
                                .out_valid, .out_pix, .out_x, .out_y);

  int img [H][W];
  int exp_q [$];
  longint exp_t [$];
  longint cyc_now = 0;
  int n_out = 0;

  function automatic int ref_mag(int x, int y);   // window centred on (x, y)
    int gx, gy, m;
    gx = (img[y-1][x+1] + 2*img[y][x+1] + img[y+1][x+1]) - (img[y-1][x-1] + 2*img[y][x-1] + img[y+1][x-1]);
    gy = (img[y+1][x-1] + 2*img[y+1][x] + img[y+1][x+1]) - (img[y-1][x-1] + 2*img[y-1][x] + img[y-1][x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  always @(posedge clk) begin
    cyc_now++;
    if (rst_n && out_valid) begin
      int e, ex, ey; longint t;
      n_out++;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        e = exp_q.pop_front(); t = exp_t.pop_front();
        ex = e % 65536; ey = (e / 65536) % 65536;
        check(out_x == ex && out_y == ey && out_pix == ref_mag(ex, ey),
              $sformatf("out (%0d,%0d)=%0d exp (%0d,%0d)=%0d", out_x, out_y, out_pix, ex, ey, ref_mag(ex, ey)));
        check(cyc_now - t == 2, $sformatf("latency %0d", cyc_now - t));
      end
    end
  end

  task automatic send_frame(input bit gaps);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        // mix smooth areas, hard edges and noise
        img[y][x] = (x > 10 && y > 2) ? 200 + $urandom % 20 : (x == 5 ? 255 : $urandom % 256);
        @(posedge clk); #1;
        in_valid = 1; in_sof = (x == 0 && y == 0); in_pix = 8'(img[y][x]);
        if (x >= 2 && y >= 2) begin
          exp_q.push_back((y - 1) * 65536 + (x - 1));
          exp_t.push_back(cyc_now + 1);            // the edge that takes this pixel
        end
        if (gaps && ($urandom % 3 == 0)) begin @(posedge clk); #1; in_valid = 0; end
      end
    @(posedge clk); #1; in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send_frame(0);
    repeat (5) @(posedge clk);
    check(n_out == (W - 2) * (H - 2), $sformatf("outputs of frame 1: %0d", n_out));
    n_out = 0;
    send_frame(1);
    repeat (5) @(posedge clk);
    check(n_out == (W - 2) * (H - 2), $sformatf("outputs of frame 2: %0d", n_out));
    check(exp_q.size() == 0, "all expected outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
