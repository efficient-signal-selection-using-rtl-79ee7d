// tb_scan_partition -- self-checking test of one partition (2 chains of
// length 4 sharing a phase counter).
//
// Signals are random each cycle; recording advances with random gaps and is
// restarted with clr at random moments. The testbench keeps its own phase
// count and the snapshot taken at each capture; it checks cap_o (capture
// exactly once every LEN recorded cycles, phase 0 right after clr) and the
// dump of both chains.
module tb_scan_partition;
  localparam int unsigned NCH = 2;
  localparam int unsigned LEN = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr, adv;
  logic [NCH*LEN-1:0] sig;
  logic [NCH-1:0] dump;
  logic cap;

  int checks = 0;
  int failures = 0;

  scan_partition #(.NCH(NCH), .LEN(LEN)) dut (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .adv_i(adv), .sig_i(sig),
    .dump_o(dump), .cap_o(cap)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NCH*LEN-1:0] snap;
  int phase, captures, clears;

  initial begin
    clr = 1'b0; adv = 1'b0; sig = '0; phase = 0; captures = 0; clears = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      sig = (NCH*LEN)'($urandom);
      clr = ($urandom % 97) == 0;
      adv = !clr && (($urandom % 4) != 0);
      #1;
      if (!clr) begin
        checks++;
        if (cap !== (phase == 0)) begin
          failures++;
          $display("cycle %0d: cap %b at phase %0d", cyc, cap, phase);
        end
        for (int j = 0; j < NCH; j++) begin
          checks++;
          if (phase == 0) begin
            if (dump[j] !== sig[j*LEN]) begin
              failures++;
              $display("cycle %0d chain %0d: capture dump %b expected %b", cyc, j, dump[j], sig[j*LEN]);
            end
          end else if (dump[j] !== snap[j*LEN + phase]) begin
            failures++;
            $display("cycle %0d chain %0d phase %0d: dump %b expected %b",
                     cyc, j, phase, dump[j], snap[j*LEN + phase]);
          end
        end
      end
      @(posedge clk);
      if (clr) begin
        phase = 0;
        clears++;
      end else if (adv) begin
        if (phase == 0) begin
          snap = sig;
          captures++;
        end
        phase = (phase + 1) % LEN;
      end
    end
    checks++;
    if (captures < 10 || clears == 0) begin
      failures++;
      $display("too few captures (%0d) or clears (%0d)", captures, clears);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
