// tb_kp_decode -- exhaustive check of the keypad decoder.
//
// Every one of the 256 (kpr, kpc) pairs is applied.  The expected words are
// written out literally as 10-bit frames {stop, ASCII, start}: 'w' on row 3
// / column 2, 'a', 's', 'd' on row 2 / columns 3, 2, 1, all ones for
// anything else; kphit must be high whenever a row is low.
`timescale 1ns/1ns
module tb_kp_decode;
  logic [3:0] kpc, kpr;
  logic       kphit;
  logic [9:0] frame;
  int checks = 0, failures = 0;
  int n_keys = 0;

  kp_decode dut (.kpc, .kpr, .kphit, .frame);

  function automatic logic [9:0] expected(logic [3:0] r, logic [3:0] c);
    if (r == 4'b0111 && c == 4'b1011) return 10'b1_0111_0111_0;  // 'w' 0x77
    if (r == 4'b1011 && c == 4'b0111) return 10'b1_0110_0001_0;  // 'a' 0x61
    if (r == 4'b1011 && c == 4'b1011) return 10'b1_0111_0011_0;  // 's' 0x73
    if (r == 4'b1011 && c == 4'b1101) return 10'b1_0110_0100_0;  // 'd' 0x64
    return 10'h3FF;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) begin
        kpr = 4'(r);
        kpc = 4'(c);
        #1;
        checks++;
        if (frame !== expected(kpr, kpc)) begin
          failures++;
          $display("FAIL kpr=%b kpc=%b frame=%b expected=%b", kpr, kpc, frame, expected(kpr, kpc));
        end
        if (frame != 10'h3FF) n_keys++;
        checks++;
        if (kphit !== (kpr != 4'hF)) begin
          failures++;
          $display("FAIL kphit kpr=%b got %b", kpr, kphit);
        end
      end
    end
    checks++;
    if (n_keys != 4) begin
      failures++;
      $display("FAIL %0d assigned keys seen, expected 4", n_keys);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
