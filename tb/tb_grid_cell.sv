// Self-checking testbench for grid_cell.  A comparison cell and a
// multiply-accumulate cell get random operands; each clock the a and b
// operands must pass through one register, and s must combine the incoming
// s with the pair the cell held (equality AND, or product sum), valid only
// when both operands were valid.
module tb_grid_cell;
  localparam int DW = 8, SW = 24;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] a_in = '0, b_in = '0;
  logic a_vin = 0, b_vin = 0, s_vin = 0;
  logic [SW-1:0] s_in = '0;
  logic [DW-1:0] ao [2], bo [2];
  logic av [2], bv [2], sv [2];
  logic [SW-1:0] so [2];
  int checks = 0, failures = 0, n_eq = 0;

  grid_cell #(.DW(DW), .SW(SW), .OP(1'b0)) u_cmp (.clk, .rst_n, .a_in, .a_vin, .b_in, .b_vin, .s_in, .s_vin,
    .a_out(ao[0]), .a_vout(av[0]), .b_out(bo[0]), .b_vout(bv[0]), .s_out(so[0]), .s_vout(sv[0]));
  grid_cell #(.DW(DW), .SW(SW), .OP(1'b1)) u_mac (.clk, .rst_n, .a_in, .a_vin, .b_in, .b_vin, .s_in, .s_vin,
    .a_out(ao[1]), .a_vout(av[1]), .b_out(bo[1]), .b_vout(bv[1]), .s_out(so[1]), .s_vout(sv[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] pa, pb;
    logic pav, pbv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 500; c++) begin
      logic [SW-1:0] e_cmp, e_mac;
      logic e_v;
      pa = ao[0]; pb = bo[0]; pav = av[0]; pbv = bv[0];
      a_in = DW'($urandom_range(0, 3)); b_in = DW'($urandom_range(0, 3));
      a_vin = $urandom_range(0, 4) != 0; b_vin = $urandom_range(0, 4) != 0;
      s_in = SW'($urandom_range(0, 1000)); s_vin = $urandom_range(0, 4) != 0;
      e_cmp = SW'(s_in[0] && pav && pbv && pa == pb);
      e_mac = s_in + SW'(signed'(pa) * signed'(pb));
      e_v = s_vin && pav && pbv;
      @(negedge clk);
      checks += 4;
      if (ao[0] != a_in || av[0] != a_vin || bo[1] != b_in || bv[1] != b_vin) begin failures++; $display("pass-through"); end
      if (so[0] != e_cmp) begin failures++; $display("cmp s=%0d expected %0d", so[0], e_cmp); end
      if (so[1] != e_mac) begin failures++; $display("mac s=%0d expected %0d", so[1], e_mac); end
      if (sv[0] != e_v || sv[1] != e_v) begin failures++; $display("s valid"); end
      if (e_cmp[0]) n_eq++;
    end
    checks++;
    if (n_eq == 0) begin failures++; $display("no equal pair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
