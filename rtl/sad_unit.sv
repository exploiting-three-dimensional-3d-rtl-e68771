// Row-serial SAD accumulator.
//
// Each valid cycle takes one row of the current MB and the matching row of
// the candidate MB (N pixels of D bits, pixel p in bits [p*D +: D]), forms
// the N absolute differences and their sum, and adds it to the running sum;
// in_first restarts the sum.  With in_last the finished SAD is registered on
// sad and sad_valid pulses one cycle later.  prec (1..D) keeps only the prec
// most significant bits of every pixel (pixel truncation), so SADs are
// computed at the same precision as the bit planes read from the DRAM.
module sad_unit #(
  parameter int unsigned N    = me3d_pkg::N_DEF,
  parameter int unsigned D    = me3d_pkg::D_DEF,
  parameter int unsigned PW   = $clog2(D + 1),
  parameter int unsigned SADW = D + 2 * $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PW-1:0]   prec,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  logic [N*D-1:0]  cur_row,
  input  logic [N*D-1:0]  cand_row,
  output logic            sad_valid,
  output logic [SADW-1:0] sad
);

  logic [D-1:0]    mask;
  logic [SADW-1:0] row_sad, acc, acc_next;

  always_comb begin
    mask = '1;
    for (int b = 0; b < D; b++) begin
      if (PW'(b) < PW'(D) - prec) mask[b] = 1'b0;
    end
    row_sad = '0;
    for (int p = 0; p < N; p++) begin
      logic [D-1:0] a, c, ad;
      a  = cur_row[p*D +: D] & mask;
      c  = cand_row[p*D +: D] & mask;
      ad = (a > c) ? a - c : c - a;
      row_sad = row_sad + SADW'(ad);
    end
    acc_next = (in_first ? '0 : acc) + row_sad;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sad       <= '0;
      sad_valid <= 1'b0;
    end else begin
      sad_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) sad <= acc_next;
      end
    end
  end

endmodule
