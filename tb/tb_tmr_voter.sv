// tb_tmr_voter: self-checking test of the bitwise majority voter.
// Random words; in half of the trials two inputs carry the same word and the
// third a corrupted copy (the voter must return the common word), in the
// other half all three are independent and each output bit is checked
// against a count of ones in that bit position.
module tb_tmr_voter;
  localparam int W = 12;
  int checks = 0, failures = 0;
  logic [W-1:0] i0, i1, i2, o;

  tmr_voter #(.W(W)) dut (.in0(i0), .in1(i1), .in2(i2), .out(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] good, bad;
      int           which;
      good  = W'($urandom);
      bad   = good ^ W'($urandom | 1);
      which = n % 3;
      if (n % 2 == 0) begin
        i0 = (which == 0) ? bad : good;
        i1 = (which == 1) ? bad : good;
        i2 = (which == 2) ? bad : good;
        #1;
        checks++;
        if (o !== good) begin
          failures++;
          $display("FAIL masked: %h %h %h -> %h, want %h", i0, i1, i2, o, good);
        end
      end else begin
        i0 = W'($urandom); i1 = W'($urandom); i2 = W'($urandom);
        #1;
        for (int b = 0; b < W; b++) begin
          int ones;
          ones = int'(i0[b]) + int'(i1[b]) + int'(i2[b]);
          checks++;
          if (o[b] !== (ones >= 2)) begin
            failures++;
            $display("FAIL bit %0d: %h %h %h -> %h", b, i0, i1, i2, o);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
