// rx_fsm: receiver frame controller.
//
// Waits for a sync hit, skips a programmable number of samples to the start of
// the training sequence, opens the training window for exactly TRAIN_N samples
// (these go to the channel estimator), then the payload window for payload_len
// samples, and returns to searching for the next frame.  Clearing enable
// returns it to IDLE from any state.
//
//   IDLE --enable--> SEARCH --sync_hit--> SKIP --offset samples--> TRAIN
//   TRAIN --TRAIN_N samples--> PAYLOAD --payload_len samples--> SEARCH
//   (SKIP is passed over when sync_offset = 0, PAYLOAD when payload_len = 0)
//
// Outputs are combinational on the state: train_active is high in TRAIN,
// train_valid and payload_valid pass sample_valid through in their windows,
// so the sample that completes the sync word is never counted and the first
// sample after the offset is the first training sample.  frame_done pulses
// for one clock, registered, after the last payload sample.
//
// The document says only that a finite state machine takes frame timing from
// the synchroniser and triggers the rest of the receive processing; the
// states, counters and offset register are this design's choice.
module rx_fsm #(
  parameter int unsigned TRAIN_N = 160,   // training samples per frame
  parameter int unsigned LEN_W   = 16     // width of the length/offset counters
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              sample_valid,
  input  logic              sync_hit,
  input  logic [LEN_W-1:0]  sync_offset,
  input  logic [LEN_W-1:0]  payload_len,
  output logic              searching,
  output logic              train_active,
  output logic              train_valid,
  output logic              payload_valid,
  output logic              frame_done,
  output logic [31:0]       frame_count,
  output logic [2:0]        state_code
);

  typedef enum logic [2:0] {IDLE, SEARCH, SKIP, TRAIN, PAYLOAD} state_t;
  state_t          state;
  logic [LEN_W-1:0] cnt;

  assign state_code    = state;
  assign searching     = (state == SEARCH);
  assign train_active  = (state == TRAIN);
  assign train_valid   = train_active && sample_valid;
  assign payload_valid = (state == PAYLOAD) && sample_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      cnt         <= '0;
      frame_done  <= 1'b0;
      frame_count <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!enable) begin
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE: state <= SEARCH;
          SEARCH:
            if (sync_hit) begin
              cnt   <= '0;
              state <= (sync_offset == '0) ? TRAIN : SKIP;
            end
          SKIP:
            if (sample_valid) begin
              if (cnt == sync_offset - 1'b1) begin
                cnt   <= '0;
                state <= TRAIN;
              end else cnt <= cnt + 1'b1;
            end
          TRAIN:
            if (sample_valid) begin
              if (cnt == LEN_W'(TRAIN_N - 1)) begin
                cnt <= '0;
                if (payload_len == '0) begin
                  state       <= SEARCH;
                  frame_done  <= 1'b1;
                  frame_count <= frame_count + 1;
                end else state <= PAYLOAD;
              end else cnt <= cnt + 1'b1;
            end
          PAYLOAD:
            if (sample_valid) begin
              if (cnt == payload_len - 1'b1) begin
                cnt         <= '0;
                state       <= SEARCH;
                frame_done  <= 1'b1;
                frame_count <= frame_count + 1;
              end else cnt <= cnt + 1'b1;
            end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
