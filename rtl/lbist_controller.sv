// lbist_controller: sequences one logic BIST session.
//
// A BIST vector is a complete scan load of all chains, one system clock that
// captures the response, and a complete shift-out through the MISR.  The
// shift-out of vector v overlaps the load of vector v+1, so a session of V
// vectors is
//     LOAD      L clocks   scan_en, prpg_en            (nothing compacted yet)
//     CAPTURE   1 clock    capture_en                   \  repeated V times
//     SHIFT     L clocks   scan_en, prpg_en, misr_en    /
// where the last SHIFT is N-1 clocks longer so that, in diagnosis mode, the
// last bits of every chain have travelled to the MISR serial output.  The
// session therefore takes L + V*(L+1) + N-1 clocks from start to done.
// Then DONE holds the signature and pass = (signature == expected_sig).
// The phase lengths of load and capture follow the reference description;
// the flush of N-1 clocks, the start/done handshake and the on-chip compare are
// own choices (the reference compares the signature after shifting it out).
//
// In DONE, sig_unload shifts the signature out of the MISR serial output
// (misr_unload), most significant stage first, one bit per clock.  pass keeps
// the result of the compare made before the first unload clock.
// start is sampled in IDLE and DONE; it clears the MISR and reseeds the PRPG
// (misr_clear / prpg_seed pulse in that cycle).  num_vectors is sampled at
// start; 0 is treated as 1.  vec_count counts captures of the session.
module lbist_controller
  import bist_pkg::*;
#(
  parameter int unsigned N           = DEF_CHAINS,
  parameter int unsigned L           = DEF_CHAIN_LEN,
  parameter int unsigned MAX_VECTORS = DEF_MAX_VECTORS,
  localparam int unsigned VW = $clog2(MAX_VECTORS + 1),
  localparam int unsigned CW = $clog2(L + N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [VW-1:0] num_vectors,
  input  logic [N-1:0]  signature,
  input  logic [N-1:0]  expected_sig,
  input  logic          sig_unload,
  output logic          scan_en,
  output logic          capture_en,
  output logic          prpg_en,
  output logic          prpg_seed,
  output logic          misr_en,
  output logic          misr_clear,
  output logic          misr_unload,
  output logic          busy,
  output logic          done,
  output logic          pass,
  output logic [VW-1:0] vec_count,
  output bist_state_e   state
);

  logic [CW-1:0] cnt;       // clocks spent in the current LOAD/SHIFT phase
  logic [CW-1:0] cnt_last;  // last value of cnt in this phase
  logic [VW-1:0] vec_total;
  logic          last_vec;  // the SHIFT in progress unloads the final vector
  logic          go;
  logic          unloading;  // the signature has been shifted at least once
  logic          pass_q;     // compare result held while unloading
  logic          match;

  assign go       = start && (state == ST_IDLE || state == ST_DONE);
  assign cnt_last = last_vec ? CW'(L + N - 2) : CW'(L - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      vec_count <= '0;
      vec_total <= VW'(1);
      last_vec  <= 1'b0;
      unloading <= 1'b0;
      pass_q    <= 1'b0;
    end else begin
      if (state == ST_DONE && !unloading) pass_q <= match;
      if (state == ST_DONE && sig_unload) unloading <= 1'b1;
      unique case (state)
        ST_IDLE, ST_DONE: if (go) begin
          state     <= ST_LOAD;
          cnt       <= '0;
          vec_count <= '0;
          vec_total <= (num_vectors == '0) ? VW'(1) : num_vectors;
          last_vec  <= 1'b0;
          unloading <= 1'b0;
        end
        ST_LOAD: begin
          if (cnt == CW'(L - 1)) begin
            state <= ST_CAPTURE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_CAPTURE: begin
          state     <= ST_SHIFT;
          vec_count <= vec_count + 1'b1;
          last_vec  <= (vec_count + 1'b1) >= vec_total;
        end
        ST_SHIFT: begin
          if (cnt == cnt_last) begin
            state <= last_vec ? ST_DONE : ST_CAPTURE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    scan_en    = (state == ST_LOAD) || (state == ST_SHIFT);
    prpg_en    = scan_en;
    misr_en    = (state == ST_SHIFT);
    capture_en = (state == ST_CAPTURE);
    misr_clear = go;
    prpg_seed  = go;
    busy       = (state != ST_IDLE) && (state != ST_DONE);
    done       = (state == ST_DONE);
    misr_unload = done && sig_unload && !go;
    match      = (signature == expected_sig);
    pass       = done && (unloading ? pass_q : match);
  end

endmodule
