// fp_match: the matching function page (FP1).
//
// It compares the newest MATCH_BYTES bytes of the shift register window with
// four configured patterns at once. Each pattern has a byte mask, so a
// pattern can be as short as one byte (a type code) or as long as the window
// (the preamble and start-of-frame delimiter). The flag is the AND over all
// masked bit positions of "data equals configuration", i.e.
//   y_match = &(~(window ^ pattern) | ~mask)
// for the pattern chosen by the controller's control code (ctrl). The
// same comparison against all patterns gives a hit vector, latched when the
// page's step ends; the microcontroller reads it to recognise which of several
// protocols an incoming frame belongs to before it loads a full configuration.
//
// Interface: cfg_we/cfg_addr/cfg_wdata write pattern p as four words at
// 4p..4p+3: pattern bytes 0..3, pattern bytes 4..7, mask bytes 0..3, mask
// bytes 4..7 (byte 0 is the newest window byte, in bits 7:0). y_match is
// combinational from the window and is 0 while the page is not active.
// hits_q is updated the clock after done.
//
// The flag as a wide AND of data against configuration registers follows the
// architecture; the masks, the several parallel patterns and the latched hit
// vector are this design's choices.
module fp_match
  import spsp_pkg::*;
#(
  parameter int unsigned N_BYTES     = 8,
  parameter int unsigned MATCH_BYTES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [4:0]              cfg_addr,
  input  logic [31:0]             cfg_wdata,
  input  logic                    active,
  input  logic                    done,
  input  logic [1:0]              ctrl,     // pattern select
  input  logic [N_BYTES-1:0][7:0] win,
  output logic                    y_match,
  output logic [3:0]              hits_q
);
  localparam int unsigned W       = MATCH_BYTES * 8;
  localparam int unsigned NUM_PAT = 4;

  logic [63:0] pat  [NUM_PAT];
  logic [63:0] mask [NUM_PAT];
  logic [NUM_PAT-1:0] hit;
  logic [W-1:0] data;

  assign data = win[MATCH_BYTES-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PAT; p++) begin
        pat[p]  <= '0;
        mask[p] <= '0;
      end
    end else if (cfg_we && !cfg_addr[4]) begin
      unique case (cfg_addr[1:0])
        2'd0: pat[cfg_addr[3:2]][31:0]   <= cfg_wdata;
        2'd1: pat[cfg_addr[3:2]][63:32]  <= cfg_wdata;
        2'd2: mask[cfg_addr[3:2]][31:0]  <= cfg_wdata;
        default: mask[cfg_addr[3:2]][63:32] <= cfg_wdata;
      endcase
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PAT; p++)
      hit[p] = &(~(data ^ pat[p][W-1:0]) | ~mask[p][W-1:0]);
  end

  assign y_match = active && hit[ctrl];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    hits_q <= '0;
    else if (done) hits_q <= hit;
  end

  initial assert (MATCH_BYTES <= N_BYTES && MATCH_BYTES <= 8);
endmodule
