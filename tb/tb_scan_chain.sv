// tb_scan_chain -- self-checking test of the shadow scan chain.
//
// Drives a length-3 chain and a length-1 chain (trace slot) with random
// signals and a capture/advance pattern that includes stall cycles
// (adv = 0). The expected dump is taken from a record of the signals at
// each capture cycle: in phase k of a period the chain must output the value
// of position k captured at phase 0. The length-1 chain must output its
// signal every cycle.
module tb_scan_chain;
  localparam int unsigned LEN = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv, cap;
  logic [LEN-1:0] sig;
  logic dump;
  logic [0:0] tsig;
  logic tdump;

  int checks = 0;
  int failures = 0;

  scan_chain #(.LEN(LEN)) dut (
    .clk(clk), .rst_n(rst_n), .adv_i(adv), .cap_i(cap), .sig_i(sig), .dump_o(dump)
  );
  scan_chain #(.LEN(1)) dut_t (
    .clk(clk), .rst_n(rst_n), .adv_i(adv), .cap_i(1'b1), .sig_i(tsig), .dump_o(tdump)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LEN-1:0] snap;
  int phase;
  int stalls;

  initial begin
    adv = 1'b0; cap = 1'b0; sig = '0; tsig = '0; phase = 0; stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      sig  = LEN'($urandom);
      tsig = 1'($urandom);
      adv  = ($urandom % 5) != 0;
      cap  = (phase == 0);
      if (!adv) stalls++;
      #1;
      // expected value, worked out from the captured snapshot
      if (cap) begin
        checks++;
        if (dump !== sig[0]) begin
          failures++;
          $display("cycle %0d: capture dump %b expected %b", cyc, dump, sig[0]);
        end
      end else begin
        checks++;
        if (dump !== snap[phase]) begin
          failures++;
          $display("cycle %0d phase %0d: dump %b expected %b", cyc, phase, dump, snap[phase]);
        end
      end
      checks++;
      if (tdump !== tsig[0]) begin
        failures++;
        $display("cycle %0d: trace slot %b expected %b", cyc, tdump, tsig[0]);
      end
      @(posedge clk);
      if (adv) begin
        if (cap) snap = sig;
        phase = (phase + 1) % LEN;
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no stall cycle was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
