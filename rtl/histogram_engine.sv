// histogram_engine: counts, for each raw TDC code 0..BINS-1, how many
// calibration samples produced it (the histogram Pin(i)).
//
// One counter per bin, held in an array. clear zeroes all bins in one cycle
// (and the sample total); each cycle with inc high adds one to bin[code].
// Counters saturate at all ones. A combinational read port (rd_addr ->
// rd_data) lets the correction logic walk the histogram. The histogram
// method is the document's; counter width, clearing and the read port are
// this design's choices.
//
// Interface: clk, rst_n (async, active low), clear, inc, code, rd_addr in;
// rd_data, total (number of samples counted, saturating) out.
// Timing: a sample presented with inc at edge k is visible on rd_data after
// edge k.
module histogram_engine #(
  parameter int unsigned BINS = 401,
  parameter int unsigned CW   = 17,
  localparam int unsigned AW  = $clog2(BINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc,
  input  logic [AW-1:0] code,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] rd_data,
  output logic [CW-1:0] total
);

  logic [CW-1:0] bin_cnt [BINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BINS); i++) bin_cnt[i] <= '0;
      total <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(BINS); i++) bin_cnt[i] <= '0;
      total <= '0;
    end else if (inc && (32'(code) < BINS)) begin
      if (bin_cnt[code] != '1) bin_cnt[code] <= bin_cnt[code] + 1'b1;
      if (total != '1) total <= total + 1'b1;
    end
  end

  assign rd_data = (32'(rd_addr) < BINS) ? bin_cnt[rd_addr] : '0;

endmodule
