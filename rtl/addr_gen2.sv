// addr_gen2: address generator 2, the loop sequencer of the two matrix multiplication phases.
//
// With K = cfg_order, Y(r,s) the column filtering results and c(p,r) the coefficients (zero
// for r > p, so the inner loops stop at the diagonal):
//   phase 1:  T(p,s) = sum_{r<=p} c(p,r) * Y(r,s)   for p = 0..K, s = 0..K
//   phase 2:  m(p,q) = sum_{s<=q} c(q,s) * T(p,s)   for q = 0..K, p = 0..K
// Both phases are one loop nest: outer o (the coefficient row in use), middle i = 0..K,
// inner k = 0..o. Each cycle one multiply-accumulate is issued: a read address for the data
// RAM (phase 1: intermediate RAM at k*(MAXORD+1)+i; phase 2: phase-1 buffer at
// i*(MAXORD+1)+k), the coefficient index k, first/last flags of the sum and its destination
// (phase 1: T(o,i); phase 2: m(i,o)). Issue waits while the coefficient generator has not
// finished row o. After the last phase-1 issue, release frees the intermediate RAM; phase 2
// starts when the pipeline has drained (DRAIN cycles) and done pulses when it drains again.
// Cycles per phase: (K+1)*(K+1)*(K+2)/2 issues plus the waits and drains.
// The document names the unit and the two phases; the loop order is this design's.
module addr_gen2 #(
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int DRAIN  = 6,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1),
  localparam int IAW   = $clog2(NST * NST)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [OW-1:0]  cfg_order,
  input  logic           start,
  output logic           idle,
  output logic           release_ib,
  output logic           done,
  // coefficient generator handshake
  output logic           coef_restart,
  output logic           coef_advance,
  input  logic           coef_row_valid,
  input  logic [OW-1:0]  coef_row_idx,
  // issue
  output logic           iss_valid,
  output logic           iss_phase,
  output logic [IAW-1:0] iss_addr,
  output logic [OW-1:0]  iss_cidx,
  output logic           iss_first,
  output logic           iss_last,
  output logic [OW-1:0]  iss_di,
  output logic [OW-1:0]  iss_dj
);

  typedef enum logic [1:0] {A_IDLE, A_RUN, A_DRAIN} astate_t;
  astate_t       st;
  logic          phase;
  logic [OW-1:0] o, i, k;
  logic [3:0]    dcnt;
  logic          end_k, end_i, end_o;

  assign idle      = (st == A_IDLE);
  assign iss_valid = (st == A_RUN) && !coef_restart && coef_row_valid && (coef_row_idx == o);
  assign iss_phase = phase;
  assign iss_cidx  = k;
  assign iss_first = (k == '0);
  assign iss_last  = end_k;
  assign end_k     = (k == o);
  assign end_i     = (i == cfg_order);
  assign end_o     = (o == cfg_order);
  assign coef_advance = iss_valid && end_k && end_i && !end_o;

  always_comb begin
    if (!phase) begin
      iss_addr = IAW'(k) * IAW'(NST) + IAW'(i);
      iss_di   = o;
      iss_dj   = i;
    end else begin
      iss_addr = IAW'(i) * IAW'(NST) + IAW'(k);
      iss_di   = i;
      iss_dj   = o;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= A_IDLE;
      phase        <= 1'b0;
      o            <= '0;
      i            <= '0;
      k            <= '0;
      dcnt         <= '0;
      coef_restart <= 1'b0;
      release_ib   <= 1'b0;
      done         <= 1'b0;
    end else begin
      coef_restart <= 1'b0;
      release_ib   <= 1'b0;
      done         <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          phase        <= 1'b0;
          o            <= '0;
          i            <= '0;
          k            <= '0;
          coef_restart <= 1'b1;
          st           <= A_RUN;
        end
        A_RUN: if (iss_valid) begin
          if (!end_k) k <= k + 1'b1;
          else begin
            k <= '0;
            if (!end_i) i <= i + 1'b1;
            else begin
              i <= '0;
              if (!end_o) o <= o + 1'b1;
              else begin
                dcnt <= '0;
                st   <= A_DRAIN;
                if (!phase) release_ib <= 1'b1;
              end
            end
          end
        end
        A_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 4'(DRAIN - 1)) begin
            if (!phase) begin
              phase        <= 1'b1;
              o            <= '0;
              coef_restart <= 1'b1;
              st           <= A_RUN;
            end else begin
              done <= 1'b1;
              st   <= A_IDLE;
            end
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
