// tb_sharpen: image-sharpening workload on the 8-bit approximate multiplier.
//
// The sharpening filter is
//   S(x,y) = 2 I(x,y) - (1/273) * sum_{i,j=-2..2} G(i+3,j+3) I(x-i,y-j)
// with the 5x5 Gaussian kernel G below (weights summing to 273). Only the
// 25 products G * I go through the approximate multiplier (multiplicand a =
// pixel, multiplier b = kernel weight); the sums, the division by 273 and
// the clipping to 0..255 are exact. Three generated 32x32 test images are
// sharpened once with exact and once with approximate products, and the
// PSNR of the approximate result against the exact one is reported. Every
// product is also checked against the reference model, and each image must
// reach a PSNR of at least 30 dB (a threshold chosen for this test).
module tb_sharpen;
  import approx_mult_ref_pkg::*;

  localparam int H = 32;
  localparam int G [5][5] = '{
    '{1,  4,  7,  4, 1},
    '{4, 16, 26, 16, 4},
    '{7, 26, 41, 26, 7},
    '{4, 16, 26, 16, 4},
    '{1,  4,  7,  4, 1}};

  logic [7:0]  a, b;
  logic [15:0] product;
  int checks = 0, failures = 0;
  int img [H][H];

  approx_multiplier dut (.a(a), .b(b), .product(product));

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic make_image(input int which);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < H; x++)
        case (which)
          0: img[y][x] = (x * 7 + y * 3 + ((x * y) % 17) * 4) & 255;             // ramp with texture
          1: img[y][x] = (((x / 8) + (y / 8)) % 2 == 1) ? 200 : 40;              // blocks with hard edges
          default: img[y][x] = clip(128 + ((x - 16) * (x - 16) + (y - 16) * (y - 16)) / 2
                                     - 60 * ((x + 2 * y) % 5 == 0 ? 1 : 0));     // radial with stripes
        endcase
  endtask

  initial begin
    for (int which = 0; which < 3; which++) begin
      real mse, psnr;
      int n;
      make_image(which);
      mse = 0.0; n = 0;
      for (int y = 2; y < H - 2; y++) begin
        for (int x = 2; x < H - 2; x++) begin
          int acc_exact, acc_approx, s_exact, s_approx;
          acc_exact = 0; acc_approx = 0;
          for (int i = -2; i <= 2; i++) begin
            for (int j = -2; j <= 2; j++) begin
              ref_result_t r;
              a = 8'(img[y - j][x - i]);
              b = 8'(G[i + 2][j + 2]);
              #1;
              r = ref_multiply(64'(a), 64'(b), 8, 4);
              checks++;
              if (64'(product) != r.product) begin
                failures++;
                if (failures < 10) $display("FAIL product %0d*%0d = %0d expected %0d", a, b, product, r.product);
              end
              acc_exact  += int'(a) * int'(b);
              acc_approx += int'(product);
            end
          end
          s_exact  = clip(2 * img[y][x] - acc_exact / 273);
          s_approx = clip(2 * img[y][x] - acc_approx / 273);
          mse += real'((s_exact - s_approx) * (s_exact - s_approx));
          n++;
        end
      end
      mse = mse / real'(n);
      psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
      $display("image %0d: MSE=%0.4f PSNR=%0.2f dB", which, mse, psnr);
      checks++;
      if (psnr < 30.0) begin
        failures++;
        $display("FAIL image %0d PSNR below 30 dB", which);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
