// Shared test-stream generation for the SHA testbenches (included inside a
// module that has W, ALGO and the queues stream_q and expect_q declared).
//
// Message k (k = 0 .. N-1) has the bit length LEN[k] from sha_vectors.svh and
// its words come from the 32-bit LCG x <- x*1664525 + 1013904223 seeded with
// k+1 (per 64-bit word: two steps, high half first). Bits past the message end
// in the last word are left as the LCG produced them: the core must ignore them.
// The message is cut at random word boundaries into segments; each segment is
// preceded by its bit length and the message ends with a zero word.

function automatic int n_msgs();
  case (ALGO)
    sha_pkg::SHA1:   return N_SHA1;
    sha_pkg::SHA224: return N_SHA224;
    sha_pkg::SHA256: return N_SHA256;
    sha_pkg::SHA384: return N_SHA384;
    default:         return N_SHA512;
  endcase
endfunction

function automatic int msg_len(int k);
  case (ALGO)
    sha_pkg::SHA1:   return LEN_SHA1[k];
    sha_pkg::SHA224: return LEN_SHA224[k];
    sha_pkg::SHA256: return LEN_SHA256[k];
    sha_pkg::SHA384: return LEN_SHA384[k];
    default:         return LEN_SHA512[k];
  endcase
endfunction

function automatic logic [63:0] msg_digest(int k, int i);
  case (ALGO)
    sha_pkg::SHA1:   return 64'(DIG_SHA1[k][i]);
    sha_pkg::SHA224: return 64'(DIG_SHA224[k][i]);
    sha_pkg::SHA256: return 64'(DIG_SHA256[k][i]);
    sha_pkg::SHA384: return DIG_SHA384[k][i];
    default:         return DIG_SHA512[k][i];
  endcase
endfunction

// Appends message k, cut into segments of at most max_seg words, to stream_q
// and its hash value to expect_q. Returns the number of segments used.
function automatic int add_message(int k, int max_seg);
  logic [31:0] x;
  logic [W-1:0] words [$];
  int nbits, nwords, pos, nseg;
  x = 32'(k + 1);
  nbits  = msg_len(k);
  nwords = (nbits + W - 1) / W;
  for (int i = 0; i < nwords; i++) begin
    logic [63:0] v;
    x = x * 32'd1664525 + 32'd1013904223;
    v = {32'h0, x};
    if (W == 64) begin
      x = x * 32'd1664525 + 32'd1013904223;
      v = {v[31:0], x};
    end
    words.push_back(W'(v));
  end
  pos = 0;
  nseg = 0;
  // all segments but the last are whole words and leave at least one word
  while (nwords - pos > 1 && ($urandom % 3) != 0) begin
    int n = 1 + int'($urandom % max_seg);
    if (n > nwords - pos - 1) n = nwords - pos - 1;
    stream_q.push_back(W'(n * W));
    for (int i = 0; i < n; i++) stream_q.push_back(words[pos + i]);
    pos += n;
    nseg++;
  end
  stream_q.push_back(W'(nbits - pos * W));
  for (int i = pos; i < nwords; i++) stream_q.push_back(words[i]);
  stream_q.push_back('0);
  for (int i = 0; i < sha_pkg::digest_words(ALGO); i++)
    expect_q.push_back(W'(msg_digest(k, i)));
  return nseg + 1;
endfunction
