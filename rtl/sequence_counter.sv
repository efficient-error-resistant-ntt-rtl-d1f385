// sequence_counter: controller of the error-resistant NTT.
//
// It steps through four phases:
//   LOAD_COEF  accepts N coefficients, one per cycle while coef_valid is high
//              (coef_ready is high in this phase), into bank A in index order;
//   LOAD_TW    accepts N/2 twiddle factors the same way (tw_ready);
//   COMPUTE    runs LAYERS layers of N/2 butterflies, one per cycle, so
//              exactly LAYERS * N/2 cycles (7 * 128 = 896 for Kyber);
//   DONE       holds the result until clr.
// In layer l (1..LAYERS) the two coefficients are len = N >> l apart; the
// b-th butterfly of the layer reads indices j and j + len, with
// j = (b / len) * 2 * len + b mod len, and twiddle factor 2^(l-1) + b / len
// (the bit-reversed order used by Kyber). Odd layers read bank A and write
// bank B, even layers the reverse (`dir`), so two banks suffice and the
// result of an odd number of layers ends in bank B (`res_b`).
// A parity mismatch (`err`, from rst_1 or rst_2 of the butterfly core)
// during COMPUTE sends the counter back to LOAD_COEF and pulses `restart`,
// so the whole computation is repeated with freshly loaded data.
// rst (synchronous) and clr both return to LOAD_COEF.
// The address pattern, cycle count and restart follow the design; the
// valid/ready loading handshake and the phase encoding are this
// implementation's choice.
module sequence_counter
  import ntt_pkg::*;
#(
  parameter int unsigned NN     = ntt_pkg::N,
  parameter int unsigned LAYERS = $clog2(NN) - 1,
  parameter int unsigned AB     = $clog2(NN),
  parameter int unsigned TB     = AB - 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  // loading
  input  logic          coef_valid,
  output logic          coef_ready,
  output logic [AB-1:0] ld_idx,
  input  logic          tw_valid,
  output logic          tw_ready,
  output logic [TB-1:0] tw_ld_idx,
  // computation
  input  logic          err,
  output logic          computing,
  output logic [AB-1:0] addr_u,
  output logic [AB-1:0] addr_v,
  output logic [TB-1:0] tw_idx,
  output logic          dir,       // 0: read A, write B; 1: read B, write A
  output logic [3:0]    layer,
  output logic          res_b,     // result is in bank B
  output logic          done,
  output logic          restart
);
  typedef enum logic [1:0] {LOAD_COEF, LOAD_TW, COMPUTE, DONE} phase_e;

  localparam int unsigned LOGN = $clog2(NN);

  phase_e        phase;
  logic [AB-1:0] cnt;      // load index or butterfly index within a layer
  logic [3:0]    lyr;      // current layer, 1..LAYERS

  logic [AB-1:0] grp, off;
  logic [3:0]    sh;       // log2(len) = LOGN - l

  always_comb begin
    sh     = 4'(LOGN) - lyr;
    grp    = cnt >> sh;
    off    = cnt & ((AB'(1) << sh) - AB'(1));
    addr_u = (grp << (sh + 4'd1)) | off;
    addr_v = addr_u + (AB'(1) << sh);
    tw_idx = TB'((AB'(1) << (lyr - 4'd1)) + grp);
  end

  assign coef_ready = (phase == LOAD_COEF);
  assign tw_ready   = (phase == LOAD_TW);
  assign ld_idx     = cnt;
  assign tw_ld_idx  = TB'(cnt);
  assign computing  = (phase == COMPUTE);
  assign done       = (phase == DONE);
  assign dir        = ~lyr[0];
  assign layer      = lyr;
  assign res_b      = LAYERS[0];

  always_ff @(posedge clk) begin
    restart <= 1'b0;
    if (rst || clr) begin
      phase <= LOAD_COEF;
      cnt   <= '0;
      lyr   <= 4'd1;
    end else begin
      unique case (phase)
        LOAD_COEF: if (coef_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AB'(NN - 1)) phase <= LOAD_TW;
        end
        LOAD_TW: if (tw_valid) begin
          if (cnt == AB'(NN / 2 - 1)) begin
            cnt   <= '0;
            phase <= COMPUTE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        COMPUTE: begin
          if (err) begin
            phase   <= LOAD_COEF;
            cnt     <= '0;
            lyr     <= 4'd1;
            restart <= 1'b1;
          end else if (cnt == AB'(NN / 2 - 1)) begin
            cnt <= '0;
            if (lyr == 4'(LAYERS)) phase <= DONE;
            else                   lyr   <= lyr + 4'd1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DONE: ;
        default: phase <= LOAD_COEF;
      endcase
    end
  end
endmodule
