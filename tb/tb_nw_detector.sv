// tb_nw_detector: self-checking test of the narrow-width detector.
// Drives warps whose 32 values are drawn from the three width classes, including
// boundary values (255/256, 65535/65536), and compares the warp width with a
// reference computed from value ranges.
module tb_nw_detector;
  import owar_pkg::*;
  warp_data_t data;
  width_e     w;
  int checks = 0, failures = 0;

  nw_detector dut (.data(data), .warp_width(w));

  function automatic logic [31:0] rand_of_class(int c);
    case (c)
      0: return $urandom_range(0, 255);
      1: return $urandom_range(256, 65535);
      default: return 32'h0001_0000 | $urandom;
    endcase
  endfunction

  function automatic width_e ref_width(warp_data_t d);
    width_e r = W_8;
    for (int t = 0; t < WARP_SIZE; t++)
      if (d[t] > 32'hFFFF) r = W_32;
      else if (d[t] > 32'hFF && r != W_32) r = W_16;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed boundaries: one thread at the edge, others zero
    logic [31:0] edges [6] = '{32'd0, 32'd255, 32'd256, 32'd65535, 32'd65536, 32'hFFFF_FFFF};
    width_e      exp_e [6] = '{W_8, W_8, W_16, W_16, W_32, W_32};
    for (int i = 0; i < 6; i++)
      for (int t = 0; t < WARP_SIZE; t += 7) begin
        data = '0;
        data[t] = edges[i];
        #1;
        checks++;
        if (w !== exp_e[i]) begin
          failures++;
          $display("FAIL edge %0h thread %0d: got %0d exp %0d", edges[i], t, w, exp_e[i]);
        end
      end
    // random warps, mostly narrow with occasional wider threads
    for (int n = 0; n < 3000; n++) begin
      int base = $urandom_range(0, 2);
      for (int t = 0; t < WARP_SIZE; t++)
        data[t] = rand_of_class(($urandom_range(0, 15) == 0) ? $urandom_range(0, 2) : base);
      #1;
      checks++;
      if (w !== ref_width(data)) begin
        failures++;
        $display("FAIL random warp: got %0d exp %0d", w, ref_width(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
