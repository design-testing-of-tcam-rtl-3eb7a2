// match_enum: returns every address that matches a key, in priority order,
// from a TCAM whose priority address encoder reports only the best match.
//
// Method: compare the key; if a word matches, report the priority address,
// read that word and save it, then overwrite it with the complement of the
// key (all bits cared), so it can no longer match and the next-priority
// match surfaces on the following compare. When a compare finds nothing,
// the saved words are written back, restoring the array.
//
// The overwrite-and-restore method is the known way to list all matches of
// a priority-encoder CAM; saving the words by Read into a local register
// file, the N-match cap and the timing are this design's choices.
//
// Interface: pulse start with key/key_care held stable until done; each
// match is reported by a one-cycle found_valid with found_addr; done rises
// once the array is restored, found_count holds the number of matches.
// The controller drives the TCAM port (op, addr, wdata, wcare) while busy
// and reads hit_valid/pae_found/pae_addr and rvalid/rdata/rcare.
//
// Timing (this design's choice): per matching word one Compare (2-cycle
// answer), one Read (1-cycle answer) and one Write, 6 cycles in all; then
// 3 cycles for the final, missing compare and 1 cycle per restored word.
// A key with no care bits matches every word, including the overwritten
// ones; the search stops after N matches, so each word is reported once
// only when the key has at least one care bit.
module match_enum
  import tcam_pkg::*;
#(
  parameter int N = 3,
  parameter int B = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [B-1:0]              key,
  input  logic [B-1:0]              key_care,
  // TCAM operation port
  output tcam_op_e                  op,
  output logic [addr_width(N)-1:0]  addr,
  output logic [B-1:0]              wdata,
  output logic [B-1:0]              wcare,
  input  logic                      hit_valid,
  input  logic                      pae_found,
  input  logic [addr_width(N)-1:0]  pae_addr,
  input  logic                      rvalid,
  input  logic [B-1:0]              rdata,
  input  logic [B-1:0]              rcare,
  // results
  output logic                      busy,
  output logic                      done,
  output logic                      found_valid,
  output logic [addr_width(N)-1:0]  found_addr,
  output logic [addr_width(N):0]    found_count
);

  localparam int AW = addr_width(N);
  localparam int CW = AW + 1;

  typedef enum logic [2:0] {
    S_IDLE, S_CMP, S_CMP_WAIT, S_RD, S_RD_WAIT, S_WR, S_RESTORE, S_DONE
  } state_e;

  state_e        state;
  logic [AW-1:0] cur;
  logic [CW-1:0] cnt, ridx;
  logic [AW-1:0] sv_addr [N];
  logic [B-1:0]  sv_data [N];
  logic [B-1:0]  sv_care [N];

  always_comb begin
    op    = OP_NOP;
    addr  = cur;
    wdata = '0;
    wcare = '0;
    unique case (state)
      S_CMP:     begin op = OP_COMPARE; wdata = key; wcare = key_care; end
      S_RD:      begin op = OP_READ; end
      S_WR:      begin op = OP_WRITE; wdata = ~key; wcare = '1; end
      S_RESTORE: begin
        op    = OP_WRITE;
        addr  = sv_addr[ridx[AW-1:0]];
        wdata = sv_data[ridx[AW-1:0]];
        wcare = sv_care[ridx[AW-1:0]];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= '0;
      cnt         <= '0;
      ridx        <= '0;
      found_valid <= 1'b0;
      found_addr  <= '0;
    end else begin
      found_valid <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE:
          if (start) begin
            state <= S_CMP;
            cnt   <= '0;
          end
        S_CMP:
          state <= S_CMP_WAIT;
        S_CMP_WAIT:
          if (hit_valid) begin
            if (pae_found && int'(cnt) < N) begin
              cur         <= pae_addr;
              found_valid <= 1'b1;
              found_addr  <= pae_addr;
              state       <= S_RD;
            end else begin
              ridx  <= '0;
              state <= (cnt == 0) ? S_DONE : S_RESTORE;
            end
          end
        S_RD:
          state <= S_RD_WAIT;
        S_RD_WAIT:
          if (rvalid) state <= S_WR;
        S_WR: begin
          cnt   <= cnt + 1'b1;
          state <= S_CMP;
        end
        S_RESTORE: begin
          ridx <= ridx + 1'b1;
          if (ridx + 1'b1 == cnt) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Saved copies of the overwritten words (no reset: written before use).
  always_ff @(posedge clk) begin
    if (state == S_RD_WAIT && rvalid) begin
      sv_addr[cnt[AW-1:0]] <= cur;
      sv_data[cnt[AW-1:0]] <= rdata;
      sv_care[cnt[AW-1:0]] <= rcare;
    end
  end

  assign busy        = (state != S_IDLE) && (state != S_DONE);
  assign done        = (state == S_DONE);
  assign found_count = cnt;

endmodule
