// Self-checking test of cmrc_width_detect: random warps whose threads hold
// values of a chosen byte width and sign (plus mixed warps), compared with a
// reference that finds each thread's width from signed range checks.
module tb_cmrc_width_detect;
  import cmrc_pkg::*;
  warp_data_t data;
  wmask_t     wm;
  int checks = 0, failures = 0;

  cmrc_width_detect dut (.data(data), .wm(wm));

  function automatic int bytes_needed(word_t v);
    longint s;
    s = longint'(signed'(v));
    if (s >= -128 && s <= 127)           return 1;
    if (s >= -32768 && s <= 32767)       return 2;
    if (s >= -8388608 && s <= 8388607)   return 3;
    return 4;
  endfunction

  function automatic word_t rand_val(int nb);
    word_t v;
    v = $urandom;
    case (nb)
      1: v = word_t'(signed'(v[7:0]));
      2: v = word_t'(signed'(v[15:0]));
      3: v = word_t'(signed'(v[23:0]));
      default: ;
    endcase
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int mx, cls;
      wmask_t exp;
      cls = $urandom_range(1, 4);
      mx = 0;
      for (int t = 0; t < WARP_SIZE; t++) begin
        int nb;
        nb = (n % 3 == 0) ? $urandom_range(1, cls) : cls;  // mixed or uniform
        data[t] = rand_val(nb);
        if (n % 7 == 0) data[t] = (t % 2) ? 32'hFFFF_FF80 : 32'h0000_007F; // mixed signs, 1 byte
        if (bytes_needed(data[t]) > mx) mx = bytes_needed(data[t]);
      end
      exp = (mx == 4) ? 3'b111 : (mx == 3) ? 3'b011 : (mx == 2) ? 3'b001 : 3'b000;
      #1;
      checks++;
      if (wm !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d wm=%b exp=%b", n, wm, exp);
      end
    end
    // boundary values: 128 needs two bytes, -129 needs two bytes
    data = '0; data[5] = 32'd128; #1; checks++; if (wm !== 3'b001) failures++;
    data = '0; data[9] = -32'sd129; #1; checks++; if (wm !== 3'b001) failures++;
    data = '1; #1; checks++; if (wm !== 3'b000) failures++;
    data = '0; data[31] = 32'h0080_0000; #1; checks++; if (wm !== 3'b111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
