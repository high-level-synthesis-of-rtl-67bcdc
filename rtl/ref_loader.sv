// ref_loader: reference sample store at the input of every GET block.
//
// Takes the reference channel from IP CTRL: a header beat carrying log2 of the block size, then
// N+1 beats with two reference indices per side each (indices 2b and 2b+1 in beat b), until the
// 2N+1 samples of each side are in. It then holds the samples in registers (one copy per GET
// block, as each prediction block in the accelerator keeps its own references) and raises
// `full` until the owning GET block pulses `release_i` when its prediction is sent.
// in_ready is high while waiting for the header or for reference beats; one beat per cycle.
module ref_loader
  import intra_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  ref_word_t in_data,
  output logic      full,
  input  logic      release_i,
  output logic [2:0] log2_size,
  output pixel_t    above [REF_LEN],
  output pixel_t    left  [REF_LEN]
);

  typedef enum logic [1:0] {L_HDR, L_LOAD, L_FULL} lstate_t;
  lstate_t state;
  logic [5:0] beat;      // beat index b of the reference payload
  logic [5:0] last_beat; // N/2 ... index 2N lies in beat N

  assign in_ready  = (state != L_FULL);
  assign full      = (state == L_FULL);
  assign last_beat = 6'(1 << log2_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_HDR;
      beat      <= '0;
      log2_size <= 3'd2;
      for (int i = 0; i < REF_LEN; i++) begin
        above[i] <= '0;
        left[i]  <= '0;
      end
    end else begin
      case (state)
        L_HDR: if (in_valid) begin
          log2_size <= in_data[2:0];
          beat      <= '0;
          state     <= L_LOAD;
        end
        L_LOAD: if (in_valid) begin
          above[2*beat] <= in_data.above0;
          left[2*beat]  <= in_data.left0;
          if (2*beat + 1 < REF_LEN) begin
            above[2*beat+1] <= in_data.above1;
            left[2*beat+1]  <= in_data.left1;
          end
          beat <= beat + 6'd1;
          if (beat == last_beat) state <= L_FULL;
        end
        default: if (release_i) state <= L_HDR;
      endcase
    end
  end

endmodule
