// tb_buffer_configs -- every trace buffer configuration of the evaluation
// (six benchmark circuits, buffers of 8, 16 and 32 bits by 4096 rows, each
// with its own number of trace slots, partitions and step function) built
// and run through a full recording with overflow. Each configuration is
// checked entry by entry by an fg_cfg_check instance; all run side by side.
//
// Configurations (width / trace slots / partitions / step):
//   s5378    8 /  4 / 1 / phi(i) = 1+phi(i-1)
//   s5378   16 /  8 / 4 / phi(i) = 2*phi(i-1)
//   s5378   32 /  8 / 3 / phi(i) = 1+phi(i-1)
//   s9234    8 /  4 / 4 / phi(i) = 2*phi(i-1)
//   s9234   16 /  8 / 4 / phi(i) = 2*phi(i-1)
//   s9234   32 / 12 / 4 / phi(i) = 2+phi(i-1)
//   s15850   8 /  2 / 3 / phi(i) = 2*phi(i-1)
//   s15850  16 /  2 / 7 / phi(i) = 1+phi(i-1)
//   s15850  32 /  8 / 6 / phi(i) = 1+phi(i-1)
//   s38584   8 /  2 / 3 / phi(i) = 2+phi(i-1)
//   s38584  16 /  4 / 3 / phi(i) = 2+phi(i-1)
//   s38584  32 /  8 / 3 / phi(i) = 1+phi(i-1)
//   s38417   8 /  2 / 3 / phi(i) = 2*phi(i-1)
//   s38417  16 /  8 / 4 / phi(i) = 2*phi(i-1)
//   s38417  32 / 16 / 4 / phi(i) = 2+phi(i-1)
//   s35932   8 /  4 / 1 / phi(i) = 1+phi(i-1)
//   s35932  16 /  8 / 1 / phi(i) = 1+phi(i-1)
//   s35932  32 / 16 / 1 / phi(i) = 1+phi(i-1)
module tb_buffer_configs;
  import fg_debug_pkg::*;

  localparam int N = 18;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] done;
  int chk [N];
  int fail [N];

  int checks = 0;
  int failures = 0;

  fg_cfg_check #(.BW(8), .OMEGA(4), .ALPHA(1), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s5378/8")) u_s5378_8 (
    .clk(clk), .done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]));

  fg_cfg_check #(.BW(16), .OMEGA(8), .ALPHA(4), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s5378/16")) u_s5378_16 (
    .clk(clk), .done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]));

  fg_cfg_check #(.BW(32), .OMEGA(8), .ALPHA(3), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s5378/32")) u_s5378_32 (
    .clk(clk), .done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]));

  fg_cfg_check #(.BW(8), .OMEGA(4), .ALPHA(4), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s9234/8")) u_s9234_8 (
    .clk(clk), .done_o(done[3]), .checks_o(chk[3]), .failures_o(fail[3]));

  fg_cfg_check #(.BW(16), .OMEGA(8), .ALPHA(4), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s9234/16")) u_s9234_16 (
    .clk(clk), .done_o(done[4]), .checks_o(chk[4]), .failures_o(fail[4]));

  fg_cfg_check #(.BW(32), .OMEGA(12), .ALPHA(4), .STEP_OP(STEP_ADD), .STEP_K(2),
                 .NAME("s9234/32")) u_s9234_32 (
    .clk(clk), .done_o(done[5]), .checks_o(chk[5]), .failures_o(fail[5]));

  fg_cfg_check #(.BW(8), .OMEGA(2), .ALPHA(3), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s15850/8")) u_s15850_8 (
    .clk(clk), .done_o(done[6]), .checks_o(chk[6]), .failures_o(fail[6]));

  fg_cfg_check #(.BW(16), .OMEGA(2), .ALPHA(7), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s15850/16")) u_s15850_16 (
    .clk(clk), .done_o(done[7]), .checks_o(chk[7]), .failures_o(fail[7]));

  fg_cfg_check #(.BW(32), .OMEGA(8), .ALPHA(6), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s15850/32")) u_s15850_32 (
    .clk(clk), .done_o(done[8]), .checks_o(chk[8]), .failures_o(fail[8]));

  fg_cfg_check #(.BW(8), .OMEGA(2), .ALPHA(3), .STEP_OP(STEP_ADD), .STEP_K(2),
                 .NAME("s38584/8")) u_s38584_8 (
    .clk(clk), .done_o(done[9]), .checks_o(chk[9]), .failures_o(fail[9]));

  fg_cfg_check #(.BW(16), .OMEGA(4), .ALPHA(3), .STEP_OP(STEP_ADD), .STEP_K(2),
                 .NAME("s38584/16")) u_s38584_16 (
    .clk(clk), .done_o(done[10]), .checks_o(chk[10]), .failures_o(fail[10]));

  fg_cfg_check #(.BW(32), .OMEGA(8), .ALPHA(3), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s38584/32")) u_s38584_32 (
    .clk(clk), .done_o(done[11]), .checks_o(chk[11]), .failures_o(fail[11]));

  fg_cfg_check #(.BW(8), .OMEGA(2), .ALPHA(3), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s38417/8")) u_s38417_8 (
    .clk(clk), .done_o(done[12]), .checks_o(chk[12]), .failures_o(fail[12]));

  fg_cfg_check #(.BW(16), .OMEGA(8), .ALPHA(4), .STEP_OP(STEP_MUL), .STEP_K(2),
                 .NAME("s38417/16")) u_s38417_16 (
    .clk(clk), .done_o(done[13]), .checks_o(chk[13]), .failures_o(fail[13]));

  fg_cfg_check #(.BW(32), .OMEGA(16), .ALPHA(4), .STEP_OP(STEP_ADD), .STEP_K(2),
                 .NAME("s38417/32")) u_s38417_32 (
    .clk(clk), .done_o(done[14]), .checks_o(chk[14]), .failures_o(fail[14]));

  fg_cfg_check #(.BW(8), .OMEGA(4), .ALPHA(1), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s35932/8")) u_s35932_8 (
    .clk(clk), .done_o(done[15]), .checks_o(chk[15]), .failures_o(fail[15]));

  fg_cfg_check #(.BW(16), .OMEGA(8), .ALPHA(1), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s35932/16")) u_s35932_16 (
    .clk(clk), .done_o(done[16]), .checks_o(chk[16]), .failures_o(fail[16]));

  fg_cfg_check #(.BW(32), .OMEGA(16), .ALPHA(1), .STEP_OP(STEP_ADD), .STEP_K(1),
                 .NAME("s35932/32")) u_s35932_32 (
    .clk(clk), .done_o(done[17]), .checks_o(chk[17]), .failures_o(fail[17]));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
