// sc2_period_probe: helper for tb_sc2_table2. Runs one stream cipher 2
// instance of the given size from a fixed key for three key periods' worth
// of bits and measures the smallest period of its keystream (lag at which
// the last third of the record repeats).
module sc2_period_probe #(
  parameter int unsigned   M      = 5,
  parameter logic [M-1:0]  QPOLY  = '0,
  parameter int unsigned   D1     = 2,
  parameter logic [D1-1:0] G1POLY = '0,
  parameter logic [M-1:0]  KEY    = '1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   period,
  output int   reseeds
);
  localparam int unsigned P  = ((1 << M) - 1) * ((1 << M) - 1);
  localparam int unsigned NB = 3 * P;

  logic load, enable, ks_valid, ks_bit, ct_bit, reseed, rekey;
  bit   rec [NB];

  sc2 #(.M(M), .N(M), .QPOLY(QPOLY), .D1(D1), .G1POLY(G1POLY), .NF(M)) dut (
    .clk, .rst_n, .load, .key(KEY), .enable, .msg_bit(1'b0), .ks_valid, .ks_bit,
    .ct_bit, .reseed, .rekey);

  initial begin
    int n;
    bit same;
    done = 0; period = 0; reseeds = 0; load = 0; enable = 0;
    @(posedge rst_n);
    @(negedge clk); load = 1; @(negedge clk); load = 0; enable = 1;
    n = 0;
    while (n < NB) begin
      @(negedge clk);
      if (ks_valid) begin rec[n] = ks_bit; n++; end
      if (reseed && n <= P) reseeds++;
    end
    enable = 0;
    for (int lag = 1; lag <= P && period == 0; lag++) begin
      same = 1;
      for (int i = NB / 3; i + lag < NB && same; i++) if (rec[i] != rec[i + lag]) same = 0;
      if (same) period = lag;
    end
    done = 1;
  end
endmodule
