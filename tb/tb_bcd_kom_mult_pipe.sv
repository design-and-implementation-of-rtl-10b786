// tb_bcd_kom_mult_pipe: end-to-end testbench of the pipelined multiplier at its
// default size (8 x 8 bits, 4 BCD output digits).
//
// It first replays the operand pairs of the published 8x8 simulation
// waveforms back to back and checks the BCD results printed there, then sends
// every one of the 65536 operand pairs, mostly on consecutive cycles with
// random idle cycles in between. Inputs change on the falling edge. A
// reference pipeline of the documented depth (7 clocks) carries each issued
// pair; on every falling edge out_valid must equal the valid bit leaving the
// reference and, when set, z must be the product, y its low four BCD digits
// and y_ovf whether the product exceeds 9999. The latency of the first result
// is also measured directly.
//
// Mechanisms that must each occur at least once (a failure is counted
// otherwise): back-to-back issue, idle cycles, a product above 9999 (y_ovf),
// a carry out of the half-sum AH+AL or BH+BL, and an output following a
// reset with the valid pipeline cleared.
module tb_bcd_kom_mult_pipe;

  localparam int unsigned LAT = 7;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [7:0]  a, b;
  logic        out_valid;
  logic [15:0] y;
  logic        y_ovf;
  logic [15:0] z;

  bcd_kom_mult_pipe dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_b2b = 0, n_idle = 0, n_ovf = 0, n_carry = 0, n_fig = 0;
  int cycle = 0;
  int first_issue = -1, first_out = -1;

  typedef struct packed {
    logic       v;
    logic [7:0] a;
    logic [7:0] b;
    logic       fig;
    logic [15:0] fig_y;
  } op_t;

  op_t ref_pipe [LAT];
  op_t cur;
  logic prev_v = 1'b0;

  // Operand pairs and BCD results printed in the published waveforms.
  localparam int NFIG = 11;
  localparam logic [7:0]  FIG_A [NFIG] = '{8'd0, 8'd11, 8'd12, 8'd15, 8'd13, 8'd14, 8'd14, 8'd11, 8'd11,
                                           8'd13, 8'd15};
  localparam logic [7:0]  FIG_B [NFIG] = '{8'd0, 8'd4,  8'd5,  8'd6,  8'd2,  8'd5,  8'd3,  8'd7,  8'd2,
                                           8'd5,  8'd2};
  localparam logic [15:0] FIG_Y [NFIG] = '{16'h0000, 16'h0044, 16'h0060, 16'h0090, 16'h0026,
                                           16'h0070, 16'h0042, 16'h0077, 16'h0022,
                                           16'h0065, 16'h0030};

  function automatic logic [15:0] low_bcd(input int unsigned v);
    logic [15:0] r = '0;
    for (int d = 0; d < 4; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int i = LAT - 1; i > 0; i--) ref_pipe[i] <= ref_pipe[i-1];
    ref_pipe[0] <= rst_n ? cur : '0;
    if (!rst_n) for (int i = 1; i < LAT; i++) ref_pipe[i] <= '0;
    if (rst_n && in_valid && first_issue < 0) first_issue <= cycle;
  end

  // Output check, one per falling edge.
  always @(negedge clk) begin
    op_t o;
    int unsigned prod;
    o = ref_pipe[LAT-1];
    checks++;
    if (out_valid !== o.v) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: out_valid=%b expected %b", cycle, out_valid, o.v);
    end
    if (o.v && out_valid) begin
      if (first_out < 0) first_out = cycle;
      prod = int'(o.a) * int'(o.b);
      checks++;
      if (z != 16'(prod) || y != low_bcd(prod) || y_ovf != (prod > 9999)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0d*%0d: z=%0d y=%h ovf=%b", o.a, o.b, z, y, y_ovf);
      end
      if (o.fig) begin
        checks++;
        n_fig++;
        if (y != o.fig_y) failures++;
      end
      if (y_ovf) n_ovf++;
    end
  end

  task automatic issue(input logic [7:0] x, input logic [7:0] w, input logic f = 1'b0,
                       input logic [15:0] fy = '0);
    @(negedge clk);
    in_valid = 1'b1;
    a = x;
    b = w;
    cur = '{v: 1'b1, a: x, b: w, fig: f, fig_y: fy};
    if (prev_v) n_b2b++;
    if ((x[7:4] + x[3:0]) > 15 || (w[7:4] + w[3:0]) > 15) n_carry++;
    prev_v = 1'b1;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    a = 8'($urandom);
    b = 8'($urandom);
    cur = '0;
    n_idle++;
    prev_v = 1'b0;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_reset_seen;
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    cur = '0;
    for (int i = 0; i < LAT; i++) ref_pipe[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published waveform vectors, back to back.
    for (int i = 0; i < NFIG; i++) issue(FIG_A[i], FIG_B[i], 1'b1, FIG_Y[i]);
    repeat (LAT + 2) idle();

    checks++;
    if (first_out - first_issue != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_out - first_issue, LAT);
    end

    // Reset while operations are in flight: nothing may come out afterwards.
    issue(8'd200, 8'd200);
    issue(8'd99, 8'd101);
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    cur = '0;
    prev_v = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_reset_seen = 0;
    repeat (LAT + 1) begin
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
      else n_reset_seen++;
    end

    // Every operand pair, with random idle cycles.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        if ($urandom_range(0, 15) == 0) idle();
        issue(8'(i), 8'(j));
      end
    end
    repeat (LAT + 2) idle();

    $display("figure vectors=%0d back-to-back=%0d idle=%0d ovf=%0d half-sum carry=%0d reset-flush=%0d",
             n_fig, n_b2b, n_idle, n_ovf, n_carry, n_reset_seen);
    checks += 6;
    if (n_fig != NFIG) failures++;
    if (n_b2b == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_carry == 0) failures++;
    if (n_reset_seen != LAT + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
