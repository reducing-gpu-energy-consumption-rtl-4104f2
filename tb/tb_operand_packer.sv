// tb_operand_packer: self-checking test of the pack / unpack unit.
// For every width and every mask with the matching number of entries, random
// narrow data are packed, the entries are checked bit by bit against the layout
// (thread t's low w bits at position t*w of the packed stream, stream chunk c in the
// c-th set entry, unused entries zero), and unpacking is checked to return the
// original values.
module tb_operand_packer;
  import owar_pkg::*;
  warp_data_t   wr_data, rd_data;
  width_e       wr_width;
  logic [3:0]   wr_mask, rd_mask;
  reg_entries_t wr_entries, rd_entries;
  int checks = 0, failures = 0;

  operand_packer dut (.wr_data, .wr_width, .wr_mask, .wr_entries,
                      .rd_entries, .rd_mask, .rd_data);

  assign rd_entries = wr_entries;
  assign rd_mask    = wr_mask;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++)
      for (int wi = 1; wi <= 3; wi++)
        for (int m = 1; m < 16; m++) begin
          int w, k, c, ok;
          w = (wi == 1) ? 8 : (wi == 2) ? 16 : 32;
          k = $countones(4'(m));
          if (k != w / 8 && !(w == 32 && k == 4)) continue;
          if (w == 32 && k != 4) continue;
          wr_width = width_e'(wi);
          wr_mask  = 4'(m);
          for (int t = 0; t < WARP_SIZE; t++)
            wr_data[t] = (w == 32) ? $urandom : ($urandom & ((32'd1 << w) - 1));
          #1;
          // layout check
          ok = 1;
          c  = 0;
          for (int e = 0; e < 4; e++) begin
            if (!wr_mask[e]) begin
              if (wr_entries[e] != '0) ok = 0;
              continue;
            end
            for (int b = 0; b < ENTRY_W; b++) begin
              int sbit, t, tb;
              sbit = c * ENTRY_W + b;
              t  = sbit / w;
              tb = sbit % w;
              if (wr_entries[e][b] !== wr_data[t][tb]) ok = 0;
            end
            c++;
          end
          checks++;
          if (!ok) begin failures++; $display("FAIL layout w=%0d mask=%b", w, wr_mask); end
          checks++;
          if (rd_data !== wr_data) begin
            failures++;
            $display("FAIL round trip w=%0d mask=%b", w, wr_mask);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
