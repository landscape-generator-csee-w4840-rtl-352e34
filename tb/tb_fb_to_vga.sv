// tb_fb_to_vga: checks VGA timing, pixel doubling and the colour tables.
//
// A model frame buffer answers each read address one clock later with a
// value computed from the address. Five whole frames are scanned, each
// with another colour_options setting (changed during vertical sync).
// Every output clock is compared with the value expected from an
// independent count of clocks since reset: sync widths and positions, the
// 640 x 480 active window, the colour for the pixel at (col/2, line/2) and
// zero colour while blanked. frame_done must pulse once per 800*525 clocks.
module tb_fb_to_vga;
  import lg_pkg::*;

  localparam int HT = 800, VT = 525;
  logic clk = 0, rst = 1;
  logic [2:0] color_options = 3'b000;
  logic [FB_AW-1:0] position;
  pixel_t current_value;
  logic frame_done, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fb_to_vga dut (.*);

  function automatic pixel_t pattern(int a);
    return pixel_t'((a / 320) / 7 + (a % 320) / 5);
  endfunction

  always @(posedge clk) current_value <= pattern(int'(position));

  initial begin
    repeat (6 * HT * VT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // colour table, per option and value; grad = line number
  function automatic logic [29:0] colour(int opt, int v, int grad);
    logic [9:0] g10, gb;
    g10 = 10'(grad);
    gb  = 10'(grad + 200);
    case (opt)
      0: case (v) 0: return {g10, 10'h080, 10'h000}; 1: return {10'h000, 10'h3FF, 10'h3FF};
                  2: return {10'h3FF, 10'h000, 10'h3FF}; default: return {30{1'b1}}; endcase
      1: case (v) 0: return {g10, 10'h080, 10'h000}; 3: return {30{1'b1}};
                  default: return {10'h000, 10'h3FF, gb}; endcase
      2: case (v) 0: return {g10, 10'h080, 10'h000}; default: return {10'h000, 10'h3FF, 10'h3FF}; endcase
      4: case (v) 0: return 30'd0; default: return {30{1'b1}}; endcase
      default: case (v) 0: return {g10, 10'h080, 10'h000}; 3: return {30{1'b1}};
                        default: return {10'h000, 10'h3FF, 10'h3FF}; endcase
    endcase
  endfunction

  int fails_timing = 0, fails_colour = 0, frames_done = 0, last_fd = -1;
  bit seen_value [4];

  initial begin
    int n, h, v, opts [5];
    bit act;
    logic [29:0] exp_c;
    opts = '{0, 1, 2, 4, 3};
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int k = 0; k < 5 * HT * VT; k++) begin
      @(negedge clk);
      n = k;
      h = n % HT;
      v = (n / HT) % VT;
      if (h == 200 && v == 1) color_options = 3'(opts[(n / (HT * VT)) % 5]);
      act = (h >= 144) && (h < 784) && (v >= 35) && (v < 515);
      checks++;
      if (vga_hs != !(h < 96) || vga_vs != !(v < 2) || vga_blank_n != act || vga_sync_n != 0) begin
        failures++;
        if (fails_timing++ < 5)
          $display("FAIL timing at h=%0d v=%0d: hs=%0d vs=%0d blank_n=%0d", h, v, vga_hs, vga_vs, vga_blank_n);
      end
      if (act) begin
        int val;
        val = int'(pattern(((v - 35) / 2) * 320 + (h - 144) / 2));
        seen_value[val] = 1;
        exp_c = colour(int'(color_options), val, v);
      end else begin
        exp_c = '0;
      end
      checks++;
      if ({vga_r, vga_g, vga_b} != exp_c) begin
        failures++;
        if (fails_colour++ < 5)
          $display("FAIL colour at h=%0d v=%0d opt=%0d: %h %h %h expected %h", h, v, color_options,
                   vga_r, vga_g, vga_b, exp_c);
      end
      if (frame_done) begin
        frames_done++;
        checks++;
        if (last_fd >= 0 && k - last_fd != HT * VT) begin
          failures++;
          $display("FAIL frame_done period %0d", k - last_fd);
        end
        last_fd = k;
      end
    end
    checks++;
    if (frames_done != 5) begin failures++; $display("FAIL frame_done count %0d", frames_done); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (!seen_value[i]) begin failures++; $display("FAIL value %0d never shown", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
