// Self-checking testbench for tsoa_comparator: all pairs of 4-bit temp/original
// words in both phases, with and without check, against the rule that the XOR must
// be all ones after inversion and all zeros after restore. Includes the example of a
// stored 1010 whose complement is read back as 1101 (stuck-at-1 in the MSB).
module tb_tsoa_comparator;
  localparam int unsigned DATA_W = 4;
  logic check, expect_inverted, mismatch;
  logic [DATA_W-1:0] temp, original, syndrome;
  int checks = 0, failures = 0;

  tsoa_comparator #(.DATA_W(DATA_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] exp_syn;
    logic exp_mm;
    for (int c = 0; c < 2; c++)
      for (int inv = 0; inv < 2; inv++)
        for (int t = 0; t < 16; t++)
          for (int o = 0; o < 16; o++) begin
            check = 1'(c); expect_inverted = 1'(inv); temp = 4'(t); original = 4'(o);
            #1;
            // bit k fails if it does not hold the value the phase expects
            for (int k = 0; k < DATA_W; k++)
              exp_syn[k] = (inv != 0) ? (temp[k] == original[k]) : (temp[k] != original[k]);
            exp_mm = (c != 0) && (exp_syn != '0);
            checks++;
            if (syndrome !== exp_syn || mismatch !== exp_mm) begin
              failures++;
              $display("c=%0d inv=%0d t=%h o=%h: syn %h/%h mm %0d/%0d", c, inv, t, o, syndrome, exp_syn, mismatch, exp_mm);
            end
          end
    // worked example: original 1010, inverted word read as 1101 -> MSB fails
    check = 1'b1; expect_inverted = 1'b1; temp = 4'b1101; original = 4'b1010; #1;
    checks++;
    if (!mismatch || syndrome !== 4'b1000) begin failures++; $display("example failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
