// tb_output_interface: self-checking test of the stage selection.
//
// Presents random valid flags, soft values and decisions for the Rake stage
// and M = 4 cancellation stages, sweeps sel over 0..M and an out-of-range
// value (which must select stage M), and checks that the registered outputs
// equal the selected stage's inputs one cycle later.
module tb_output_interface;
  import mpic_pkg::*;

  localparam int K = 10, M = 4, ZW = 21, SW = 3;

  logic clk = 0, rst_n = 0;
  logic [SW-1:0]        sel;
  logic                 st_valid [M+1];
  logic signed [ZW-1:0] st_z     [M+1][K];
  logic [K-1:0]         st_b     [M+1];
  logic                 out_valid;
  logic signed [ZW-1:0] z_out [K];
  logic [K-1:0]         b_out;

  int checks = 0, failures = 0;
  int sel_seen [8];

  always #5 clk = ~clk;

  output_interface #(.K(K), .M(M), .ZW(ZW), .SW(SW)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es;
    logic                 ev;
    logic signed [ZW-1:0] ez [K];
    logic [K-1:0]         eb;
    foreach (sel_seen[i]) sel_seen[i] = 0;
    sel = '0;
    foreach (st_valid[m]) st_valid[m] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      sel = SW'($urandom_range(M + 2));
      for (int m = 0; m <= M; m++) begin
        st_valid[m] = 1'($urandom);
        st_b[m] = K'($urandom);
        for (int k = 0; k < K; k++) st_z[m][k] = ZW'($urandom);
      end
      es = (int'(sel) > M) ? M : int'(sel);
      sel_seen[sel]++;
      ev = st_valid[es];
      ez = st_z[es];
      eb = st_b[es];
      @(negedge clk);
      checks += 3;
      if (out_valid != ev) begin failures++; $display("valid wrong, sel %0d", sel); end
      if (z_out != ez) begin failures++; $display("z wrong, sel %0d", sel); end
      if (b_out != eb) begin failures++; $display("b wrong, sel %0d", sel); end
    end
    for (int s = 0; s <= M + 2; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("sel %0d never tried", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
